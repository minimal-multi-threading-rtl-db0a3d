// tb_fetch_sync: self-checking test of shared fetch and re-synchronisation.
//
// Every thread runs the same small loop program (PCs are byte addresses):
//   0x100..0x11c straight code
//   0x120  branch: taken to 0x200 when cond1(thread, iteration), else falls through
//   0x124..0x13c path B, 0x140 jump to 0x300
//   0x200..0x22c path A (longer), 0x230 jump to 0x300
//   0x300  straight, 0x304 branch: taken to 0x700 when cond2(thread, iteration)
//   0x308..0x31c straight, 0x320 loop branch to 0x100, to 0x400 (end) after ITER
//   0x700..0x70c side path, 0x710 jump back to 0x308
// The conditions differ between threads so the threads diverge and must find
// each other again. Checks: every thread sees exactly its own program's PC
// sequence whatever ITIDs are formed; in CATCHUP the ahead thread does not
// fetch while the behind thread is ready (two-thread run); every mode
// transition of the fetch state machine occurs; shared fetch saves fetches.
// Run with 2 threads and with 4 threads (random fetch stalls).
module tb_fetch_sync;
  import mmt_pkg::*;

  int checks = 0, failures = 0;
  int done_runs = 0;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tb_fetch_sync_run #(.NT(2), .ITER(40), .STALLS(0)) r2 ();
  tb_fetch_sync_run #(.NT(4), .ITER(40), .STALLS(1)) r4 ();

  initial begin
    wait (r2.finished && r4.finished);
    checks   = r2.checks + r4.checks;
    failures = r2.failures + r4.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
