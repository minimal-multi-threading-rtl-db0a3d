// tb_fhb_sweep: the end-to-end test of mmt_core repeated with Fetch History
// Buffers of 8, 16, 32, 64 and 128 entries per thread, the range over which
// the MMT proposal studies the buffer size (32 is its choice and this
// design's default). Each size runs the same program, in multi-execution and
// multi-threaded form, with every committed result checked against the
// per-thread reference model and every mechanism required to occur (see
// tb_mmt_core). Printed per size: fetches, the share of fetches made for more
// than one thread, CATCHUP entries, false CATCHUPs (CATCHUP->DETECT) and
// re-merges, to show how the buffer size changes re-synchronisation. The
// loop of the program is short, so beyond 16 entries every size holds all of
// its branch targets and behaves alike; with 8 entries targets are pushed out
// before the behind thread reaches them, which shows as false CATCHUPs.
module tb_fhb_sweep;
  logic [4:0] done;
  int checks, failures, i;

  tb_fhb_sweep_run #(.FHB_ENTRIES(8))   r8   (.done(done[0]));
  tb_fhb_sweep_run #(.FHB_ENTRIES(16))  r16  (.done(done[1]));
  tb_fhb_sweep_run #(.FHB_ENTRIES(32))  r32  (.done(done[2]));
  tb_fhb_sweep_run #(.FHB_ENTRIES(64))  r64  (.done(done[3]));
  tb_fhb_sweep_run #(.FHB_ENTRIES(128)) r128 (.done(done[4]));

  function automatic int sum_checks();
    return r8.checks + r16.checks + r32.checks + r64.checks + r128.checks;
  endfunction
  function automatic int sum_failures();
    return r8.failures + r16.failures + r32.failures + r64.failures + r128.failures;
  endfunction

  initial begin
    for (i = 0; i < 400000 && done != '1; i++) #10;
    checks = sum_checks();
    failures = sum_failures();
    if (done != '1) begin
      failures++;
      $display("watchdog expired");
    end else begin
      $display("FHB   fetches shared-fetch%% catchup false-catchup remerge uops");
      $display("%4d %9d %12d %7d %13d %7d %5d", 8,   r8.n_fetch,   100 * r8.n_shared_fetch / r8.n_fetch,     r8.n_cu,   r8.n_da,   r8.n_rm,   r8.n_uops);
      $display("%4d %9d %12d %7d %13d %7d %5d", 16,  r16.n_fetch,  100 * r16.n_shared_fetch / r16.n_fetch,   r16.n_cu,  r16.n_da,  r16.n_rm,  r16.n_uops);
      $display("%4d %9d %12d %7d %13d %7d %5d", 32,  r32.n_fetch,  100 * r32.n_shared_fetch / r32.n_fetch,   r32.n_cu,  r32.n_da,  r32.n_rm,  r32.n_uops);
      $display("%4d %9d %12d %7d %13d %7d %5d", 64,  r64.n_fetch,  100 * r64.n_shared_fetch / r64.n_fetch,   r64.n_cu,  r64.n_da,  r64.n_rm,  r64.n_uops);
      $display("%4d %9d %12d %7d %13d %7d %5d", 128, r128.n_fetch, 100 * r128.n_shared_fetch / r128.n_fetch, r128.n_cu, r128.n_da, r128.n_rm, r128.n_uops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
