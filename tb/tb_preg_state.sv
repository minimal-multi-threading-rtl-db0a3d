// tb_preg_state: self-checking test of physical register owners/allocation.
// A reference owner table follows random allocations (up to 4 per cycle, each
// with a random owner set) and releases of owned registers. Checked every
// cycle: the granted registers are the lowest free ones in slot order,
// alloc_ok, the free count, and the start state of both workload kinds.
// The pool is driven until it runs out, so alloc_ok = 0 (the rename stall)
// is exercised.
module tb_preg_state;
  import mmt_pkg::*;
  localparam int unsigned NT = 4, NA = 50, NPR = 256, SP = 29;
  localparam int unsigned PR_W = $clog2(NPR);

  logic clk = 0, rst_n = 0, init = 0, multi_exec = 1;
  logic [NT-1:0] thread_active = '1;
  logic [NT-1:0] alloc_req = '0, alloc_fire = '0;
  logic [NT-1:0][PR_W-1:0] alloc_preg;
  logic alloc_ok;
  logic [NT-1:0][NT-1:0] alloc_owner = '0;
  logic rel_valid = 0;
  logic [NT-1:0] rel_itid = '0;
  logic [NT-1:0][PR_W-1:0] rel_old = '0;
  logic [PR_W:0] free_count;
  int checks = 0, failures = 0, stalls = 0;
  logic [NT-1:0] own [NPR];

  preg_state #(.NT(NT), .NUM_AREGS(NA), .NUM_PREGS(NPR), .SP_REG(SP)) dut (.*);
  always #5 clk = ~clk;

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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 2; w++) begin
      @(negedge clk); multi_exec = (w == 0); init = 1;
      @(negedge clk); init = 0;
      for (int p = 0; p < NPR; p++) own[p] = (p < NA) ? thread_active : '0;
      if (w == 1) begin
        own[SP] = '0;
        for (int t = 0; t < NT; t++) own[NA + t] = NT'(1 << t);
      end
      for (int n = 0; n < 3000; n++) begin
        int fc, slot_reg[NT], k;
        bit ok;
        bit used [NPR];
        // drain phase then refill phase
        bit drain;
        drain = (n % 1000) < 600;
        alloc_req = '0;
        for (int s = 0; s < NT; s++) begin
          alloc_req[s]   = $urandom_range(0, 1);
          alloc_owner[s] = NT'($urandom_range(1, 15));
        end
        rel_valid = !drain || $urandom_range(0, 3) == 0;
        rel_itid = '0;
        for (int t = 0; t < NT; t++) begin
          int tries;
          tries = 0;
          while (tries < 20) begin
            int p;
            p = $urandom_range(0, NPR - 1);
            if (own[p][t]) begin rel_itid[t] = $urandom_range(0, 1); rel_old[t] = PR_W'(p); break; end
            tries++;
          end
        end
        #1;
        // reference
        fc = 0;
        foreach (own[p]) begin used[p] = 0; if (own[p] == 0) fc++; end
        chk(free_count == fc, $sformatf("free count %0d vs %0d", free_count, fc));
        ok = 1;
        for (int s = 0; s < NT; s++) begin
          slot_reg[s] = -1;
          if (alloc_req[s]) begin
            for (int p = 0; p < NPR; p++)
              if (own[p] == 0 && !used[p]) begin slot_reg[s] = p; used[p] = 1; break; end
            if (slot_reg[s] < 0) ok = 0;
            else chk(alloc_preg[s] == PR_W'(slot_reg[s]), $sformatf("slot %0d got %0d expected %0d", s, alloc_preg[s], slot_reg[s]));
          end
        end
        chk(alloc_ok == ok, "alloc_ok");
        if (!ok) stalls++;
        alloc_fire = ok ? alloc_req : '0;
        @(posedge clk);
        #1;
        if (rel_valid)
          for (int t = 0; t < NT; t++) if (rel_itid[t]) own[rel_old[t]][t] = 1'b0;
        for (int s = 0; s < NT; s++) if (alloc_fire[s]) own[slot_reg[s]] = alloc_owner[s];
        @(negedge clk);
        alloc_fire = '0;
      end
    end
    chk(stalls > 0, "pool never ran out");
    $display("allocation stalls: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
