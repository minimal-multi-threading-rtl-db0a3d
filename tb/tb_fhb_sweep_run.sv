// tb_fhb_sweep_run: one run of the end-to-end test (tb_mmt_common.svh) on an
// mmt_core whose Fetch History Buffers have FHB_ENTRIES entries. Raises done
// when both workloads have finished; checks and failures are counted in the
// instance (read by tb_fhb_sweep). Everything else is at the core's defaults.
module tb_fhb_sweep_run #(
  parameter int FHB_ENTRIES = 32
) (
  output logic done
);
  import mmt_pkg::*;
`include "tb_mmt_common.svh"

  mmt_core #(.FHB_ENTRIES(FHB_ENTRIES)) dut (.*);

  initial begin
    done = 1'b0;
    run_all();
    done = 1'b1;
  end
endmodule
