// tb_rat: self-checking test of the ITID-aware rename table.
// Random groups of uops with disjoint ITIDs are renamed while the register
// supply (alloc_ok) and the consumer (out_ready) stall at random. A reference
// map per thread gives the expected physical sources (read from the lowest
// thread of each ITID), the previous mappings of every thread and the new
// destination, which must appear in the map of every thread of the ITID.
// Checks the start state of a multi-threaded workload (private stack pointer).
module tb_rat;
  import mmt_pkg::*;
  localparam int unsigned NT = 4, NA = 50, NPR = 256, SP = 29, PC_W = 32;
  localparam int unsigned AR_W = $clog2(NA), PR_W = $clog2(NPR);

  logic clk = 0, rst_n = 0, init = 0, multi_exec = 0;
  logic in_valid = 0, in_ready;
  logic [PC_W-1:0] in_pc = '0;
  fetch_mode_e in_mode = MODE_MERGE;
  op_class_e in_op = OP_ALU;
  logic [1:0] in_src_valid = '1;
  logic [1:0][AR_W-1:0] in_src = '0;
  logic in_dst_valid = 0;
  logic [AR_W-1:0] in_dst = '0;
  logic [NT-1:0][NT-1:0] in_itid = '0;
  logic in_lvip_identical = 1;
  logic [NT-1:0] alloc_req, alloc_fire;
  logic [NT-1:0][PR_W-1:0] alloc_preg;
  logic alloc_ok = 1;
  logic [NT-1:0] rn_valid;
  logic [NT-1:0][NT-1:0] rn_itid;
  logic [AR_W-1:0] rn_dst;
  logic [NT-1:0][PR_W-1:0] rn_pdst;
  logic out_valid, out_ready = 1;
  logic [PC_W-1:0] out_pc;
  fetch_mode_e out_mode;
  op_class_e out_op;
  logic [NT-1:0][NT-1:0] out_itid;
  logic [1:0] out_src_valid;
  logic [NT-1:0][1:0][PR_W-1:0] out_psrc;
  logic out_dst_valid;
  logic [AR_W-1:0] out_dst;
  logic [NT-1:0][PR_W-1:0] out_pdst, out_old_pdst;
  logic out_lvip_identical;

  rat #(.NT(NT), .PC_W(PC_W), .NUM_AREGS(NA), .NUM_PREGS(NPR), .SP_REG(SP)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0, renamed = 0;
  int map [NT][NA];
  int next_preg = 100;
  typedef struct {
    logic [PC_W-1:0] pc;
    logic [NT-1:0][NT-1:0] itid;
    logic [NT-1:0][1:0][PR_W-1:0] psrc;
    logic [NT-1:0][PR_W-1:0] pdst;
    logic [NT-1:0][PR_W-1:0] old;
    logic dv;
  } exp_t;
  exp_t q [$];

  always_comb for (int k = 0; k < NT; k++) alloc_preg[k] = PR_W'(next_preg + k);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // consumer side
  always @(negedge clk) if (rst_n) begin
    out_ready = ($urandom_range(0, 3) != 0);
    #1;
    if (out_valid && out_ready) begin
      exp_t e;
      chk(q.size() > 0, "output without input");
      if (q.size() > 0) begin
        e = q.pop_front();
        chk(out_pc == e.pc && out_itid == e.itid, "pc/itid");
        for (int k = 0; k < NT; k++)
          if (e.itid[k] != 0) begin
            chk(out_psrc[k] == e.psrc[k], $sformatf("psrc slot %0d", k));
            if (e.dv) chk(out_pdst[k] == e.pdst[k], $sformatf("pdst slot %0d", k));
          end
        if (e.dv)
          for (int t = 0; t < NT; t++)
            for (int k = 0; k < NT; k++)
              if (e.itid[k][t]) chk(out_old_pdst[t] == e.old[t], $sformatf("old_pdst thread %0d", t));
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int t = 0; t < NT; t++)
      for (int r = 0; r < NA; r++) map[t][r] = (r == SP) ? NA + t : r;
    for (int n = 0; n < 4000; n++) begin
      exp_t e;
      int lab [NT];
      logic [NT-1:0] act;
      in_valid = ($urandom_range(0, 4) != 0);
      in_pc = 32'h1000 + 4 * n;
      in_src[0] = ($urandom_range(0, 5) == 0) ? AR_W'(SP) : AR_W'($urandom_range(0, NA - 1));
      in_src[1] = AR_W'($urandom_range(0, NA - 1));
      in_dst_valid = ($urandom_range(0, 4) != 0);
      in_dst = ($urandom_range(0, 5) == 0) ? AR_W'(SP) : AR_W'($urandom_range(0, NA - 1));
      in_itid = '0;
      act = NT'($urandom_range(1, 15));
      for (int t = 0; t < NT; t++) begin
        lab[t] = $urandom_range(0, NT - 1);
        if (act[t]) in_itid[lab[t]][t] = 1'b1;
      end
      alloc_ok = ($urandom_range(0, 5) != 0);
      #2;
      if (in_valid && !in_ready) stalls++;
      if (in_valid && in_ready) begin
        e.pc = in_pc; e.itid = in_itid; e.dv = in_dst_valid; e.psrc = '0; e.pdst = '0; e.old = '0;
        for (int k = 0; k < NT; k++) begin
          int rep;
          rep = -1;
          for (int t = NT - 1; t >= 0; t--) if (in_itid[k][t]) rep = t;
          if (rep >= 0) begin
            e.psrc[k][0] = PR_W'(map[rep][in_src[0]]);
            e.psrc[k][1] = PR_W'(map[rep][in_src[1]]);
            e.pdst[k] = PR_W'(next_preg + k);
          end
        end
        for (int t = 0; t < NT; t++) e.old[t] = PR_W'(map[t][in_dst]);
        q.push_back(e);
        renamed++;
      end
      @(posedge clk);
      #1;
      if (e.pc == in_pc && in_valid && q.size() > 0 && q[$].pc == in_pc && in_dst_valid) begin
        for (int k = 0; k < NT; k++)
          for (int t = 0; t < NT; t++)
            if (in_itid[k][t]) map[t][in_dst] = next_preg + k;
        next_preg = (next_preg + NT) % 200;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    chk(q.size() == 0, "uops lost");
    chk(stalls > 0, "no stall seen");
    $display("renamed %0d groups, %0d stall cycles", renamed, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
