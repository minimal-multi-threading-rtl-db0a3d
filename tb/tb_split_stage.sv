// tb_split_stage: self-checking test of the split stage (table + predictor +
// splitter + destination update) with random instructions, random
// register-merging sets, LVIP updates and output stalls, in both workload
// kinds. The reference keeps its own pair table and set of mispredicted load
// PCs; for each instruction it forms the sharing bits of the sources, applies
// the Table 2 rules (split multi-execution loads the LVIP marks), finds the
// greedy largest sharing groups, and then updates the destination entry.
// Outputs are checked at each transfer, the table every cycle, and the stage's
// one-cycle latency at the first instruction.
module tb_split_stage;
  import mmt_pkg::*;
  localparam int unsigned NT = 4, NA = 50, SP = 29, PC_W = 32;
  localparam int unsigned NP = num_pairs(NT), AR_W = $clog2(NA), CN_W = $clog2(NT + 1);

  logic clk = 0, rst_n = 0, init = 0, lvip_clear = 0, multi_exec = 1;
  logic in_valid = 0, in_ready;
  logic [PC_W-1:0] in_pc = '0;
  logic [NT-1:0] in_itid = '0;
  fetch_mode_e in_mode = MODE_MERGE;
  op_class_e in_op = OP_ALU;
  logic [1:0] in_src_valid = '0;
  logic [1:0][AR_W-1:0] in_src = '0;
  logic in_dst_valid = 0;
  logic [AR_W-1:0] in_dst = '0;
  logic out_valid, out_ready = 1;
  logic [PC_W-1:0] out_pc;
  fetch_mode_e out_mode;
  op_class_e out_op;
  logic [1:0] out_src_valid;
  logic [1:0][AR_W-1:0] out_src;
  logic out_dst_valid;
  logic [AR_W-1:0] out_dst;
  logic [NT-1:0][NT-1:0] out_itid;
  logic [CN_W-1:0] out_count;
  logic out_lvip_identical;
  logic ms_valid = 0;
  logic [AR_W-1:0] ms_reg = '0;
  logic [NP-1:0] ms_pairs = '0;
  logic lv_upd_valid = 0;
  logic [PC_W-1:0] lv_upd_pc = '0;
  logic [NA-1:0][NP-1:0] rst_table;

  split_stage #(.NT(NT), .PC_W(PC_W), .NUM_AREGS(NA), .SP_REG(SP), .LVIP_ENTRIES(4096)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_split = 0, n_merged = 0, n_lvip_split = 0;
  logic [NP-1:0] sh [NA];
  bit badpc [logic [PC_W-1:0]];
  typedef struct { logic [PC_W-1:0] pc; logic [NT-1:0][NT-1:0] itid; bit lv; } exp_t;
  exp_t q [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic int ones(logic [NT-1:0] v);
    int n;
    n = 0;
    for (int i = 0; i < NT; i++) n += v[i];
    return n;
  endfunction

  function automatic bit clique(logic [NT-1:0] s, logic [NP-1:0] p);
    for (int a = 0; a < NT; a++)
      for (int b = a + 1; b < NT; b++)
        if (s[a] && s[b] && !p[pair_index(a, b, NT)]) return 0;
    return 1;
  endfunction

  always @(negedge clk) if (rst_n) begin
    out_ready = ($urandom_range(0, 3) != 0);
    #1;
    if (out_valid && out_ready) begin
      exp_t e;
      chk(q.size() > 0, "output without input");
      if (q.size() > 0) begin
        e = q.pop_front();
        chk(out_pc == e.pc, "pc order");
        chk(out_itid == e.itid, $sformatf("pc %h itid %p expected %p", out_pc, out_itid, e.itid));
        chk(out_lvip_identical == e.lv, "lvip flag");
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 2; w++) begin
      @(negedge clk); multi_exec = (w == 0); init = 1; lvip_clear = 1; q.delete(); badpc.delete();
      @(negedge clk); init = 0; lvip_clear = 0;
      for (int r = 0; r < NA; r++) sh[r] = (w == 1 && r == SP) ? '0 : '1;
      for (int n = 0; n < 3000; n++) begin
        exp_t e;
        logic [NP-1:0] ps;
        logic [NT-1:0] rem;
        bit force_s, acc;
        in_valid = ($urandom_range(0, 5) != 0);
        in_pc = PC_W'(32'h2000 + 4 * $urandom_range(0, 15));
        in_itid = ($urandom_range(0, 2) == 0) ? NT'($urandom_range(1, 15)) : '1;
        case ($urandom_range(0, 3))
          0: in_op = OP_ALU; 1: in_op = OP_BRANCH; 2: in_op = OP_LOAD; default: in_op = OP_STORE;
        endcase
        in_mode = MODE_MERGE;
        in_src_valid = 2'($urandom_range(0, 3));
        in_src[0] = ($urandom_range(0, 7) == 0) ? AR_W'(SP) : AR_W'($urandom_range(0, 5));
        in_src[1] = AR_W'($urandom_range(0, 5));
        in_dst_valid = (in_op == OP_ALU || in_op == OP_LOAD);
        in_dst = AR_W'($urandom_range(0, 5));
        ms_valid = ($urandom_range(0, 5) == 0);
        ms_reg = AR_W'($urandom_range(0, 5));
        ms_pairs = NP'($urandom);
        lv_upd_valid = ($urandom_range(0, 9) == 0);
        lv_upd_pc = PC_W'(32'h2000 + 4 * $urandom_range(0, 15));
        #2;
        acc = in_valid && in_ready;
        for (int r = 0; r < NA; r++) chk(rst_table[r] == sh[r], $sformatf("table reg %0d", r));
        if (acc) begin
          if (n == 0) chk(!out_valid, "output before one cycle");
          ps = '1;
          for (int s = 0; s < 2; s++) if (in_src_valid[s]) ps &= sh[in_src[s]];
          force_s = (in_op == OP_LOAD) && multi_exec && badpc.exists(in_pc);
          rem = in_itid;
          e.pc = in_pc; e.itid = '0; e.lv = !force_s;
          for (int k = 0; k < NT; k++) begin
            int best;
            best = 0;
            for (int s = 1; s < 16; s++)
              if ((NT'(s) & ~rem) == 0 && (force_s ? ones(NT'(s)) == 1 : clique(NT'(s), ps)) &&
                  ones(NT'(s)) > best) begin best = ones(NT'(s)); e.itid[k] = NT'(s); end
            rem &= ~e.itid[k];
          end
          if (force_s) n_lvip_split++;
          if (e.itid[1] != 0) n_split++; else if (ones(in_itid) > 1) n_merged++;
          q.push_back(e);
        end
        @(posedge clk);
        #1;
        if (ms_valid) sh[ms_reg] |= ms_pairs;
        if (acc && in_dst_valid)
          for (int a = 0; a < NT; a++)
            for (int b = a + 1; b < NT; b++)
              if (in_itid[a] || in_itid[b]) begin
                bit same;
                same = 0;
                for (int k = 0; k < NT; k++) if (e.itid[k][a] && e.itid[k][b]) same = 1;
                sh[in_dst][pair_index(a, b, NT)] = same;
              end
        if (lv_upd_valid) badpc[lv_upd_pc] = 1;
        @(negedge clk);
      end
      in_valid = 0; ms_valid = 0; lv_upd_valid = 0;
      repeat (10) @(negedge clk);
      chk(q.size() == 0, "instructions lost");
    end
    chk(n_split > 0 && n_merged > 0 && n_lvip_split > 0, "split, merged and LVIP-split cases all seen");
    $display("split %0d, kept merged %0d, split by LVIP %0d", n_split, n_merged, n_lvip_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
