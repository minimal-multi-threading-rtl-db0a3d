// lvip: Load Values Identical Predictor.
//
// In a multi-execution workload each thread is a separate process, so a load
// from the same virtual address may return different data in different
// threads. The predictor says whether a load fetched and addressed in common
// will nevertheless load the same value everywhere: it predicts "identical"
// unless the load's PC is in a table of PCs whose loads were mispredicted
// before (document, Section 4.2.5).
//
// The table is direct mapped, ENTRIES entries of a valid bit and the full PC
// (4 bytes, as the document sizes it), indexed by PC bits above the 4-byte
// instruction alignment; the organisation and the indexing are this design's
// choice. Lookup is combinational (lk_pc -> lk_identical in the same cycle).
// A misprediction reported on upd_valid/upd_pc is written at the clock edge
// and replaces whatever PC held that entry.
module lvip #(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned PC_W    = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic [PC_W-1:0] lk_pc,
  output logic            lk_identical,
  input  logic            upd_valid,
  input  logic [PC_W-1:0] upd_pc
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic [PC_W-1:0]    tag_mem [ENTRIES];
  logic [ENTRIES-1:0] valid_q;

  logic [IDX_W-1:0] lk_idx, upd_idx;
  assign lk_idx  = lk_pc[IDX_W+1:2];
  assign upd_idx = upd_pc[IDX_W+1:2];

  assign lk_identical = !(valid_q[lk_idx] && tag_mem[lk_idx] == lk_pc);

  always_ff @(posedge clk) begin
    if (upd_valid) tag_mem[upd_idx] <= upd_pc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         valid_q <= '0;
    else if (init)      valid_q <= '0;
    else if (upd_valid) valid_q[upd_idx] <= 1'b1;
  end

endmodule
