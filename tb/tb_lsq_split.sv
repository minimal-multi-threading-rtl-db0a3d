// tb_lsq_split: self-checking test of the per-thread load/store expansion.
// A memory model with one address space per thread (initial contents a
// function of thread and address; some addresses hold equal data in every
// thread) answers after a random delay. Random loads and stores with random
// ITIDs and predictions run in both workload kinds. Checked: the sequence of
// (thread, address, write) requests, one outstanding at a time; the value of
// every thread at completion; shared memory accessed once per access;
// misprediction raised exactly when a shared-predicted load of a
// multi-execution workload loads different values.
module tb_lsq_split;
  import mmt_pkg::*;
  localparam int unsigned NT = 4, XLEN = 64, PC_W = 32, TAG_W = 8;
  localparam int unsigned TI_W = $clog2(NT);

  logic clk = 0, rst_n = 0, multi_exec = 1;
  logic in_valid = 0, in_ready;
  logic [NT-1:0] in_itid = '0;
  logic in_store = 0;
  logic [XLEN-1:0] in_addr = '0, in_wdata = '0;
  logic [PC_W-1:0] in_pc = '0;
  logic in_lvip_identical = 1;
  logic [TAG_W-1:0] in_tag = '0;
  logic mem_req_valid, mem_req_ready, mem_req_we;
  logic [TI_W-1:0] mem_req_tid;
  logic [XLEN-1:0] mem_req_addr, mem_req_wdata;
  logic mem_resp_valid = 0;
  logic [XLEN-1:0] mem_resp_data = '0;
  logic done_valid, done_store, misp;
  logic [NT-1:0] done_itid;
  logic [TAG_W-1:0] done_tag;
  logic [NT-1:0][XLEN-1:0] done_data;
  logic [PC_W-1:0] misp_pc;

  lsq_split #(.NT(NT), .XLEN(XLEN), .PC_W(PC_W), .TAG_W(TAG_W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_misp = 0, n_me_multi = 0;
  logic [XLEN-1:0] mem [NT][int];   // written locations
  int reqs [$];                      // expected request sequence: tid*1000 + addr/8, +100000 if write

  function automatic logic [XLEN-1:0] rd(int t, int a);
    if (mem[t].exists(a)) return mem[t][a];
    return (a < 64) ? XLEN'(a * 3) : XLEN'(a * 3 + t);   // low addresses equal in all threads
  endfunction

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // memory: accept requests at random, answer loads after 1..4 cycles
  int outstanding = 0;
  always @(negedge clk) mem_req_ready <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n) begin
    mem_resp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) begin
      int e, a;
      a = int'(mem_req_addr);
      e = int'(mem_req_tid) * 1000 + a / 8 + (mem_req_we ? 100000 : 0);
      chk(outstanding == 0, "request while a load is outstanding");
      chk(reqs.size() > 0 && reqs[0] == e, $sformatf("request %0d unexpected", e));
      if (reqs.size() > 0) void'(reqs.pop_front());
      if (mem_req_we) mem[mem_req_tid][a] = mem_req_wdata;
      else begin
        outstanding = 1;
        fork
          automatic logic [XLEN-1:0] v = rd(int'(mem_req_tid), a);
          begin
            repeat ($urandom_range(1, 4)) @(posedge clk);
            mem_resp_valid <= 1'b1;
            mem_resp_data  <= v;
            outstanding = 0;
          end
        join_none
      end
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      logic [NT-1:0][XLEN-1:0] ev;
      bit differ, exp_misp;
      int a, first;
      @(negedge clk);
      multi_exec = (n % 500) < 350;
      in_itid = NT'($urandom_range(1, 15));
      in_store = ($urandom_range(0, 3) == 0);
      a = 8 * $urandom_range(0, 15);
      in_addr = XLEN'(a);
      in_wdata = XLEN'($urandom_range(0, 1000));
      in_pc = PC_W'(32'h4000 + 4 * n);
      in_lvip_identical = ($urandom_range(0, 3) != 0);
      in_tag = TAG_W'(n);
      // expected requests and values
      first = -1;
      for (int t = NT - 1; t >= 0; t--) if (in_itid[t]) first = t;
      differ = 0;
      for (int t = 0; t < NT; t++)
        if (in_itid[t] && (multi_exec || t == first)) begin
          reqs.push_back(t * 1000 + a / 8 + (in_store ? 100000 : 0));
          ev[t] = rd(multi_exec ? t : first, a);
          if (ev[t] != rd(multi_exec ? first : first, a)) differ = 1;
        end else ev[t] = rd(first, a);
      exp_misp = multi_exec && !in_store && in_lvip_identical && (in_itid & (in_itid - 1)) != 0 && differ;
      if (multi_exec && (in_itid & (in_itid - 1)) != 0 && !in_store) n_me_multi++;
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      while (!done_valid) @(negedge clk);
      chk(done_itid == in_itid && done_tag == TAG_W'(n) && done_store == in_store, "done fields");
      chk(misp == exp_misp, $sformatf("misp %0b expected %0b", misp, exp_misp));
      if (exp_misp) chk(misp_pc == in_pc, "misp pc");
      n_misp += exp_misp;
      if (!in_store)
        for (int t = 0; t < NT; t++)
          if (in_itid[t]) chk(done_data[t] == ev[t], $sformatf("thread %0d data %0d expected %0d", t, done_data[t], ev[t]));
      chk(reqs.size() == 0, "requests missing");
      reqs.delete();
    end
    chk(n_misp > 0, "no misprediction seen");
    $display("%0d mispredictions among %0d shared multi-execution loads", n_misp, n_me_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
