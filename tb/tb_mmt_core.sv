// tb_mmt_core: end-to-end test of the MMT core at its default parameters
// (4 threads, 32-entry history buffers, 4K-entry LVIP, 50/256 registers).
//
// All threads run the same loop program (dec and next_pc below), first as a
// multi-execution workload (separate memories that differ above address
// 0x100, so a shared load eventually loads different values), then as a
// multi-threaded workload (shared memory, private stack pointers). Branches
// at 0x120 and 0x304 go different ways in different threads, so threads
// diverge, run apart, find each other through the history buffers and merge.
// The load at 0x11c reads an address whose value differs between the
// multi-execution instances, so its first shared execution is an LVIP
// misprediction; after that the LVIP makes it execute once per thread.
//
// Around the core the testbench models the frontend (program and branch
// outcomes), an in-order execution engine with a physical register file that
// executes each renamed uop once and commits it, and the memory. A
// misprediction of the LVIP restarts all threads from the beginning (the
// predictor keeps what it learned). Every committed uop is checked, for every
// thread of its ITID, against a separate per-thread instruction-set model:
// PC, and value of the destination. Also checked: fetch-to-rename latency of
// 3 cycles (fetch, decode register, split stage), that all threads finish,
// and that each mechanism occurred: divergence, CATCHUP, CATCHUP->DETECT,
// re-merge, shared fetch, split, shared execution, register-merging check and
// merge, LVIP rollback, per-thread expansion of a shared store, fetch stall.
module tb_mmt_core;
  import mmt_pkg::*;
`include "tb_mmt_common.svh"

  mmt_core dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
