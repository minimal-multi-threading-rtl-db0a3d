// tb_mmt_common.svh: shared body of the end-to-end testbenches of mmt_core
// (tb_mmt_core at the default parameters, tb_fhb_sweep over history buffer
// sizes). Included inside a testbench module, after which the module
// instantiates mmt_core as dut with .* and calls run_all(). It declares
// every port signal of the core, the clock, the check counters, the
// program and frontend model, the memory, the register file, the
// per-thread reference model, the event counters and the execution engine;
// see tb_mmt_core for what is run and checked.

  localparam int unsigned NT = 4, PC_W = 32, NA = 50, NPR = 256, XLEN = 64, SP = 29;
  localparam int unsigned NP = num_pairs(NT), AR_W = $clog2(NA), PR_W = $clog2(NPR);
  localparam int unsigned TI_W = $clog2(NT);
  localparam int ITER = 24;
  localparam logic [PC_W-1:0] END_PC = 32'h400;

  logic clk = 0, rst_n = 0, init = 0, lvip_clear = 0, multi_exec = 1, merge_en = 1;
  logic [PC_W-1:0] init_pc = 32'h100;
  logic [NT-1:0] thread_active, thread_ready = '1;
  logic fetch_valid;
  logic [PC_W-1:0] fetch_pc;
  logic [NT-1:0] fetch_itid;
  fetch_mode_e fetch_mode;
  logic [NT-1:0][PC_W-1:0] fe_next_pc;
  logic [NT-1:0] fe_taken;
  op_class_e fe_op;
  logic [1:0] fe_src_valid;
  logic [1:0][AR_W-1:0] fe_src;
  logic fe_dst_valid;
  logic [AR_W-1:0] fe_dst;
  logic ren_valid, ren_ready = 0;
  logic [PC_W-1:0] ren_pc;
  fetch_mode_e ren_mode;
  op_class_e ren_op;
  logic [NT-1:0][NT-1:0] ren_itid;
  logic [1:0] ren_src_valid;
  logic [NT-1:0][1:0][PR_W-1:0] ren_psrc;
  logic ren_dst_valid;
  logic [AR_W-1:0] ren_dst;
  logic [NT-1:0][PR_W-1:0] ren_pdst, ren_old_pdst;
  logic ren_lvip_identical;
  logic cm_valid = 0;
  logic [NT-1:0] cm_itid = '0;
  fetch_mode_e cm_mode = MODE_MERGE;
  logic cm_dst_valid = 0;
  logic [AR_W-1:0] cm_dst = '0;
  logic [PR_W-1:0] cm_pdst = '0;
  logic [NT-1:0][PR_W-1:0] cm_old_pdst = '0;
  logic [XLEN-1:0] cm_value = '0;
  logic [NT-1:0] rf_req, rf_gnt = '1;
  logic [NT-1:0][PR_W-1:0] rf_addr;
  logic [NT-1:0][XLEN-1:0] rf_data;
  logic ls_valid = 0, ls_ready;
  logic [NT-1:0] ls_itid = '0;
  logic ls_store = 0;
  logic [XLEN-1:0] ls_addr = '0, ls_wdata = '0;
  logic [PC_W-1:0] ls_pc = '0;
  logic ls_lvip_identical = 1;
  logic [PR_W-1:0] ls_tag = '0;
  logic mem_req_valid, mem_req_ready = 1, mem_req_we;
  logic [TI_W-1:0] mem_req_tid;
  logic [XLEN-1:0] mem_req_addr, mem_req_wdata;
  logic mem_resp_valid = 0;
  logic [XLEN-1:0] mem_resp_data = '0;
  logic ls_done_valid;
  logic [NT-1:0] ls_done_itid;
  logic [PR_W-1:0] ls_done_tag;
  logic [NT-1:0][XLEN-1:0] ls_done_data;
  logic rollback;
  fetch_mode_e pair_mode [NP];
  logic [NA-1:0][NP-1:0] rst_table;
  logic [PR_W:0] free_pregs;
  logic [3:0] ev_fetch;
  logic ev_merge_check, ev_merge_hit;


  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", m, $time);
    end
  endtask



  // ---------------- program ----------------
  typedef struct packed {
    op_class_e op;
    logic s0v, s1v, dv;
    logic [5:0] s0, s1, d;
    logic [15:0] imm;
  } ins_t;

  function automatic ins_t dec(logic [PC_W-1:0] pc);
    ins_t i;
    i = '{op: OP_ALU, s0v: 1, s1v: 0, dv: 1, s0: 12, s1: 0, d: 12, imm: 0};
    if (pc == 32'h100)                      i = '{OP_ALU,    1, 0, 1, 2, 0, 2, 8};
    else if (pc == 32'h104)                 i = '{OP_LOAD,   1, 0, 1, 2, 0, 1, 16'h40};
    else if (pc == 32'h108)                 i = '{OP_ALU,    1, 1, 1, 1, 2, 3, 0};
    else if (pc == 32'h10c)                 i = '{OP_ALU,    1, 1, 1, SP, 2, 4, 0};
    else if (pc == 32'h110)                 i = '{OP_STORE,  1, 1, 0, 4, 3, 0, 0};
    else if (pc == 32'h114)                 i = '{OP_ALU,    1, 1, 1, 5, 3, 5, 0};
    else if (pc == 32'h118)                 i = '{OP_ALU,    1, 0, 1, 2, 0, 6, 1};
    else if (pc == 32'h11c)                 i = '{OP_LOAD,   1, 0, 1, 0, 0, 7, 16'h100};
    else if (pc == 32'h120)                 i = '{OP_BRANCH, 1, 0, 0, 1, 0, 0, 0};
    else if (pc == 32'h124)                 i = '{OP_ALU,    1, 0, 1, 2, 0, 9, 5};
    else if (pc >= 32'h128 && pc < 32'h140) i = '{OP_ALU,    1, 0, 1, 8, 0, 8, 3};
    else if (pc == 32'h140)                 i = '{OP_BRANCH, 0, 0, 0, 0, 0, 0, 0};
    else if (pc == 32'h200)                 i = '{OP_ALU,    1, 0, 1, 8, 0, 8, 7};
    else if (pc == 32'h210)                 i = '{OP_ALU,    1, 0, 1, 2, 0, 9, 5};
    else if (pc > 32'h200 && pc < 32'h230)  i = '{OP_ALU,    1, 0, 1, 8, 0, 8, 1};
    else if (pc == 32'h230)                 i = '{OP_BRANCH, 0, 0, 0, 0, 0, 0, 0};
    else if (pc == 32'h300)                 i = '{OP_ALU,    1, 1, 1, 9, 2, 1, 0};
    else if (pc == 32'h304)                 i = '{OP_BRANCH, 1, 0, 0, 1, 0, 0, 0};
    else if (pc >= 32'h308 && pc < 32'h320) i = '{OP_ALU,    1, 1, 1, 10, 2, 10, 0};
    else if (pc == 32'h320)                 i = '{OP_BRANCH, 1, 0, 0, 2, 0, 0, 0};
    else if (pc >= 32'h700 && pc < 32'h710) i = '{OP_ALU,    1, 0, 1, 11, 0, 11, 1};
    else if (pc == 32'h710)                 i = '{OP_BRANCH, 0, 0, 0, 0, 0, 0, 0};
    return i;
  endfunction

  function automatic bit cond1(int t, int it);
    return ((t * 7 + it * 3) % 5) < 2;
  endfunction
  function automatic bit cond2(int t, int it);
    return ((t + it) % 4) == 1;
  endfunction

  function automatic logic [PC_W-1:0] next_pc(int t, logic [PC_W-1:0] pc, int it);
    case (pc)
      32'h120: return cond1(t, it) ? 32'h200 : 32'h124;
      32'h140, 32'h230: return 32'h300;
      32'h304: return cond2(t, it) ? 32'h700 : 32'h308;
      32'h320: return (it + 1 < ITER) ? 32'h100 : END_PC;
      32'h710: return 32'h308;
      default: return pc + 4;
    endcase
  endfunction

  // initial memory: multi-execution instances differ at and above 0x100
  function automatic logic [XLEN-1:0] mem_init(int t, logic [XLEN-1:0] a);
    if (!multi_exec) return a * 2;
    return (a >= 64'h100) ? a * 2 + XLEN'(t) : a * 2;
  endfunction

  function automatic logic [XLEN-1:0] reg_init(int t, int r);
    if (r == SP) return multi_exec ? 64'h1000 : 64'h1000 + 64'h100 * XLEN'(t);
    return XLEN'(r * 16);
  endfunction

  // ---------------- frontend ----------------
  logic [PC_W-1:0] fpc [NT];
  logic started = 0;
  int fiter [NT];

  always_comb begin
    ins_t i;
    i = dec(fetch_pc);
    fe_op = i.op; fe_src_valid = {i.s1v, i.s0v};
    fe_src[0] = AR_W'(i.s0); fe_src[1] = AR_W'(i.s1);
    fe_dst_valid = i.dv; fe_dst = AR_W'(i.d);
    for (int t = 0; t < NT; t++) begin
      fe_next_pc[t] = next_pc(t, fetch_pc, fiter[t]);
      fe_taken[t]   = (fe_next_pc[t] != fetch_pc + 4);
      thread_active[t] = started && (init || fpc[t] != END_PC);
    end
  end

  always @(posedge clk)
    if (init) begin
      for (int t = 0; t < NT; t++) begin fpc[t] <= init_pc; fiter[t] <= 0; end
    end else if (fetch_valid)
      for (int t = 0; t < NT; t++)
        if (fetch_itid[t]) begin
          fpc[t] <= fe_next_pc[t];
          if (fetch_pc == 32'h320) fiter[t] <= fiter[t] + 1;
        end

  // ---------------- memory (separate per thread for multi-execution) ----------------
  logic [XLEN-1:0] dmem [NT][logic [XLEN-1:0]];
  int mem_wait = 0;
  logic [XLEN-1:0] mem_pending;

  function automatic logic [XLEN-1:0] dmem_rd(int t, logic [XLEN-1:0] a);
    int tt;
    tt = multi_exec ? t : 0;
    if (dmem[tt].exists(a)) return dmem[tt][a];
    return mem_init(t, a);
  endfunction

  int n_mem_req = 0;
  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mem_wait > 0) begin
      mem_wait <= mem_wait - 1;
      if (mem_wait == 1) begin mem_resp_valid <= 1'b1; mem_resp_data <= mem_pending; end
    end
    if (mem_req_valid && mem_req_ready) begin
      n_mem_req++;
      if (mem_req_we) dmem[multi_exec ? int'(mem_req_tid) : 0][mem_req_addr] = mem_req_wdata;
      else begin
        mem_pending <= dmem_rd(int'(mem_req_tid), mem_req_addr);
        mem_wait <= 2;
      end
    end
  end

  // ---------------- physical register file ----------------
  logic [XLEN-1:0] prf [NPR];
  always_comb for (int u = 0; u < NT; u++) rf_data[u] = prf[rf_addr[u]];

  // ---------------- per-thread reference model ----------------
  logic [XLEN-1:0] iss_r [NT][NA];
  logic [PC_W-1:0] iss_pc [NT];
  int iss_it [NT];
  logic [XLEN-1:0] imem [NT][logic [XLEN-1:0]];

  task automatic iss_check(int t, logic [PC_W-1:0] pc, bit has_val, logic [XLEN-1:0] val);
    ins_t i;
    logic [XLEN-1:0] a, v;
    int tt;
    tt = multi_exec ? t : 0;
    chk(iss_pc[t] == pc, $sformatf("thread %0d committed pc %h, model at %h", t, pc, iss_pc[t]));
    i = dec(iss_pc[t]);
    a = iss_r[t][i.s0] + XLEN'(i.imm);
    v = '0;
    case (i.op)
      OP_ALU: v = iss_r[t][i.s0] + (i.s1v ? iss_r[t][i.s1] : '0) + XLEN'(i.imm);
      OP_LOAD: v = imem[tt].exists(a) ? imem[tt][a] : mem_init(t, a);
      OP_STORE: imem[tt][a] = iss_r[t][i.s1];
      default: ;
    endcase
    if (i.dv) begin
      chk(has_val && val == v, $sformatf("thread %0d pc %h iteration %0d value %0d, model %0d", t, pc, iss_it[t], val, v));
      iss_r[t][i.d] = v;
    end
    if (iss_pc[t] == 32'h320) iss_it[t]++;
    iss_pc[t] = next_pc(t, iss_pc[t], iss_it[t] - ((iss_pc[t] == 32'h320) ? 1 : 0));
  endtask

  // ---------------- statistics ----------------
  int n_div = 0, n_cu = 0, n_da = 0, n_rm = 0, n_fetch = 0, n_shared_fetch = 0;
  int n_split = 0, n_shared_exec = 0, n_mcheck = 0, n_mhit = 0, n_rollback = 0;
  int n_store_expand = 0, n_fetch_stall = 0, n_uops = 0, n_thread_insts = 0;
  bit stop_engine = 0;
  int first_fetch_cycle = -1, first_ren_cycle = -1, cyc = 0;

  always @(posedge clk) if (rst_n && !init) begin
    cyc++;
    n_div += ev_fetch[0]; n_cu += ev_fetch[1]; n_da += ev_fetch[2]; n_rm += ev_fetch[3];
    n_mcheck += ev_merge_check; n_mhit += ev_merge_hit;
    if (fetch_valid) begin
      n_fetch++;
      if ((fetch_itid & (fetch_itid - 1)) != 0) n_shared_fetch++;
      if (first_fetch_cycle < 0) first_fetch_cycle = cyc;
    end else if (thread_active != '0) n_fetch_stall++;
    if (ren_valid && first_ren_cycle < 0) first_ren_cycle = cyc;
  end

  // ---------------- execution engine (in order, one uop at a time) ----------------
  task automatic commit(logic [NT-1:0] itid, fetch_mode_e mode, bit dv, logic [AR_W-1:0] d,
                        logic [PR_W-1:0] pd, logic [NT-1:0][PR_W-1:0] old, logic [XLEN-1:0] v);
    cm_valid = 1; cm_itid = itid; cm_mode = mode; cm_dst_valid = dv; cm_dst = d; cm_pdst = pd;
    cm_old_pdst = old; cm_value = v;
    rf_gnt = ($urandom_range(0, 3) != 0) ? '1 : NT'($urandom_range(0, 15));
    @(posedge clk);
    #1;
    cm_valid = 0;
    @(negedge clk);
  endtask

  // the renamed group, captured at the rename handshake
  logic [PC_W-1:0] pc;
  fetch_mode_e mode;
  op_class_e op;
  logic [NT-1:0][NT-1:0] itid;
  logic [1:0] sv;
  logic [NT-1:0][1:0][PR_W-1:0] ps;
  logic dv, lvi;
  logic [AR_W-1:0] d;
  logic [NT-1:0][PR_W-1:0] pd, old;

  task automatic run_group();
    ins_t i;
    i = dec(pc);
    if (itid[1] != 0) n_split++;
    for (int k = 0; k < NT; k++)
      if (itid[k] != 0 && !stop_engine) begin
        logic [XLEN-1:0] a0, a1, v;
        a0 = prf[ps[k][0]];
        a1 = sv[1] ? prf[ps[k][1]] : '0;
        n_uops++;
        for (int t = 0; t < NT; t++) n_thread_insts += itid[k][t];
        if ((itid[k] & (itid[k] - 1)) != 0) n_shared_exec++;
        v = '0;
        if (op == OP_LOAD || op == OP_STORE) begin
          ls_valid = 1; ls_itid = itid[k]; ls_store = (op == OP_STORE);
          ls_addr = a0 + XLEN'(i.imm); ls_wdata = a1; ls_pc = pc; ls_lvip_identical = lvi;
          ls_tag = pd[k];
          if (op == OP_STORE && multi_exec && (itid[k] & (itid[k] - 1)) != 0) n_store_expand++;
          @(posedge clk);
          while (!ls_ready) @(posedge clk);
          #1 ls_valid = 0;
          while (!ls_done_valid) begin @(posedge clk); #1; end
          if (rollback) begin
            n_rollback++;
            stop_engine = 1;
          end else begin
            for (int t = NT - 1; t >= 0; t--) if (itid[k][t]) v = ls_done_data[t];
          end
          @(negedge clk);
        end else if (op == OP_ALU) begin
          v = a0 + a1 + XLEN'(i.imm);
        end
        if (!stop_engine) begin
          if (dv) prf[pd[k]] = v;
          for (int t = 0; t < NT; t++) if (itid[k][t]) iss_check(t, pc, dv, v);
          commit(itid[k], mode, dv, d, pd[k], old, v);
        end
      end
  endtask

  task automatic start_run(bit me, bit clear_lvip);
    @(negedge clk);
    multi_exec = me; init = 1; lvip_clear = clear_lvip;
    for (int p = 0; p < NPR; p++) prf[p] = '0;
    for (int t = 0; t < NT; t++) begin
      for (int r = 0; r < NA; r++) begin
        iss_r[t][r] = reg_init(t, r);
        prf[r] = reg_init(0, r);
      end
      if (!me) prf[NA + t] = reg_init(t, SP);
      iss_pc[t] = init_pc; iss_it[t] = 0;
      imem[t].delete(); dmem[t].delete();
    end
    stop_engine = 0;
    started = 1;
    @(negedge clk);
    init = 0; lvip_clear = 0;
  endtask

  task automatic run_workload(bit me, output int cycles);
    int restarts;
    restarts = 0;
    cycles = 0;
    start_run(me, 1);
    forever begin
      if (ren_valid) begin
        pc = ren_pc; mode = ren_mode; op = ren_op; itid = ren_itid; sv = ren_src_valid;
        ps = ren_psrc; dv = ren_dst_valid; d = ren_dst; pd = ren_pdst; old = ren_old_pdst;
        lvi = ren_lvip_identical;
        ren_ready = 1;
        @(posedge clk);
        #1 ren_ready = 0;
        @(negedge clk);
        run_group();
      end else begin
        @(negedge clk);
      end
      cycles++;
      if (stop_engine) begin
        restarts++;
        chk(restarts < 4, "too many restarts");
        if (restarts >= 4) break;
        start_run(me, 0);
      end
      if (thread_active == '0 && !ren_valid) begin
        bit all_end;
        all_end = 1;
        for (int t = 0; t < NT; t++) if (iss_pc[t] != END_PC) all_end = 0;
        if (all_end) break;
      end
    end
  endtask


  // both workloads, then the checks that every mechanism occurred
  task automatic run_all();
    int c_me, c_mt;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fetch-to-rename latency
    run_workload(1'b1, c_me);
    chk(first_ren_cycle - first_fetch_cycle == 3,
        $sformatf("fetch to rename %0d cycles, expected 3", first_ren_cycle - first_fetch_cycle));
    $display("multi-execution run done: %0d engine steps, %0d rollbacks", c_me, n_rollback);
    run_workload(1'b0, c_mt);
    $display("multi-threaded run done: %0d engine steps", c_mt);
    for (int t = 0; t < NT; t++) chk(iss_pc[t] == END_PC && iss_it[t] == ITER, $sformatf("thread %0d unfinished", t));
    $display("fetches=%0d shared-fetches=%0d fetch-stall-cycles=%0d uops=%0d thread-instructions=%0d",
             n_fetch, n_shared_fetch, n_fetch_stall, n_uops, n_thread_insts);
    $display("diverge=%0d catchup=%0d detect-again=%0d remerge=%0d split=%0d shared-exec=%0d",
             n_div, n_cu, n_da, n_rm, n_split, n_shared_exec);
    $display("merge-checks=%0d merges=%0d rollbacks=%0d store-expansions=%0d mem-requests=%0d",
             n_mcheck, n_mhit, n_rollback, n_store_expand, n_mem_req);
    chk(n_div > 0, "no divergence");
    chk(n_cu > 0, "no CATCHUP");
    chk(n_da > 0, "no CATCHUP->DETECT");
    chk(n_rm > 0, "no re-merge");
    chk(n_shared_fetch > 0, "no shared fetch");
    chk(n_split > 0, "no split");
    chk(n_shared_exec > 0, "no shared execution");
    chk(n_mcheck > 0, "no register-merging check");
    chk(n_mhit > 0, "no register merged");
    chk(n_rollback > 0, "no LVIP rollback");
    chk(n_store_expand > 0, "no store expansion");
    chk(n_fetch_stall > 0, "no fetch stall");
    chk(n_uops < n_thread_insts, "no execution saved");
  endtask
