// tb_fetch_sync_run: one run of the fetch_sync test (see tb_fetch_sync) for a
// given thread count; drives the frontend model and counts checks.
module tb_fetch_sync_run #(
  parameter int unsigned NT     = 2,
  parameter int unsigned ITER   = 40,
  parameter bit          STALLS = 1'b0
) ();
  import mmt_pkg::*;
  localparam int unsigned PC_W = 32;
  localparam int unsigned NP   = num_pairs(NT);

  logic clk = 0, rst_n = 0, init = 0, stall = 0;
  logic [PC_W-1:0] init_pc = 32'h100;
  logic [NT-1:0] thread_active, thread_ready;
  logic fetch_valid;
  logic [PC_W-1:0] fetch_pc;
  logic [NT-1:0] fetch_itid;
  fetch_mode_e fetch_mode;
  logic [NT-1:0][PC_W-1:0] resp_next_pc, thread_pc;
  logic [NT-1:0] resp_taken;
  fetch_mode_e pair_mode [NP];
  logic ev_diverge, ev_catchup, ev_detect_again, ev_remerge;

  int checks = 0, failures = 0;
  bit finished = 0;
  int iter [NT];
  logic [PC_W-1:0] exp_pc [NT];
  int n_fetch = 0, n_thread_insts = 0;
  int n_div = 0, n_cu = 0, n_da = 0, n_rm = 0, n_merged = 0;
  int cu_thread = -1;
  logic f_valid;
  logic [NT-1:0] f_itid;

  fetch_sync #(.NT(NT), .PC_W(PC_W), .FHB_ENTRIES(32)) dut (.*);
  always #5 clk = ~clk;

  function automatic bit cond1(int t, int i);
    return ((t * 7 + i * 3) % 5) < 2;
  endfunction
  function automatic bit cond2(int t, int i);
    return ((t + i) % 4) == 1;
  endfunction

  // program model: next PC and whether a taken branch led there
  function automatic void step(int t, logic [PC_W-1:0] pc, int it,
                               output logic [PC_W-1:0] npc, output bit tk);
    tk = 1'b1;
    case (pc)
      32'h120: npc = cond1(t, it) ? 32'h200 : 32'h124;
      32'h140: npc = 32'h300;
      32'h230: npc = 32'h300;
      32'h304: npc = cond2(t, it) ? 32'h700 : 32'h308;
      32'h320: npc = (it + 1 < ITER) ? 32'h100 : 32'h400;
      32'h710: npc = 32'h308;
      default: npc = pc + 4;
    endcase
    if (npc == pc + 4) tk = 1'b0;
  endfunction

  always_comb begin
    for (int t = 0; t < NT; t++) begin
      logic [PC_W-1:0] n;
      bit k;
      step(t, thread_pc[t], iter[t], n, k);
      resp_next_pc[t] = n;
      resp_taken[t]   = k;
      thread_active[t] = rst_n && (thread_pc[t] != 32'h400);
    end
  end

  initial begin
    thread_ready = '1;
    for (int t = 0; t < NT; t++) begin iter[t] = 0; exp_pc[t] = 32'h100; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    while (thread_active != '0) begin
      if (STALLS) thread_ready = NT'($urandom_range(0, (1 << NT) - 1)) | NT'($urandom_range(0, 1) ? '1 : '0);
      #1;
      if (fetch_valid) begin
        n_fetch++;
        if (fetch_itid == thread_active) n_merged++;
        for (int t = 0; t < NT; t++)
          if (fetch_itid[t]) begin
            n_thread_insts++;
            checks++;
            if (fetch_pc !== exp_pc[t] || !thread_active[t] || !thread_ready[t]) begin
              failures++;
              $display("FAIL NT=%0d thread %0d fetched %h expected %h", NT, t, fetch_pc, exp_pc[t]);
            end
          end
        // two threads: in CATCHUP only the behind thread fetches
        if (NT == 2 && pair_mode[0] == MODE_CATCHUP) begin
          checks++;
          if (cu_thread >= 0 && !fetch_itid[cu_thread] ) begin
            failures++;
            $display("FAIL ahead thread fetched during CATCHUP");
          end
          for (int t = 0; t < NT; t++) if (fetch_itid[t] && fetch_itid != '1) cu_thread = t;
        end else cu_thread = -1;
      end
      n_div += ev_diverge; n_cu += ev_catchup; n_da += ev_detect_again; n_rm += ev_remerge;
      f_valid = fetch_valid;
      f_itid  = fetch_itid;
      @(posedge clk);
      #1;
      if (f_valid)
        for (int t = 0; t < NT; t++)
          if (f_itid[t]) begin
            logic [PC_W-1:0] n;
            bit k;
            step(t, exp_pc[t], iter[t], n, k);
            if (exp_pc[t] == 32'h320) iter[t]++;
            exp_pc[t] = n;
          end
      @(negedge clk);
    end
    checks += 6;
    if (n_div == 0) begin failures++; $display("FAIL NT=%0d no divergence", NT); end
    if (n_cu == 0)  begin failures++; $display("FAIL NT=%0d no CATCHUP", NT); end
    if (n_da == 0)  begin failures++; $display("FAIL NT=%0d no CATCHUP->DETECT", NT); end
    if (n_rm == 0)  begin failures++; $display("FAIL NT=%0d no remerge", NT); end
    if (n_fetch >= n_thread_insts) begin failures++; $display("FAIL NT=%0d no fetch saved", NT); end
    for (int t = 0; t < NT; t++)
      if (iter[t] != ITER) begin failures++; $display("FAIL thread %0d iterations %0d", t, iter[t]); end
    $display("NT=%0d fetches=%0d thread-instructions=%0d all-merged=%0d diverge=%0d catchup=%0d detect-again=%0d remerge=%0d",
             NT, n_fetch, n_thread_insts, n_merged, n_div, n_cu, n_da, n_rm);
    finished = 1;
  end
endmodule
