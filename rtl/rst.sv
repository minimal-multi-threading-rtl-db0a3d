// rst: Register Sharing Table.
//
// One entry per architected register, one bit per thread pair in each entry
// (6 bits for 4 threads). A 1 means the two threads' copies of the register
// hold the same value (in practice: map to the same physical register, or
// were found equal by register merging); a 0 means they may differ.
//
// Reads: two combinational read ports for the source registers of the
// instruction in the split stage. Update from the split stage (document,
// Section 4.2.3): for the destination register, every pair with at least one
// thread in the original ITID is set to 1 if one resulting ITID holds both
// threads and to 0 otherwise; pairs with no thread in the ITID keep their
// value. Register merging ORs a set of pairs into one entry; when both
// updates hit the same register in one cycle the split update, which belongs
// to the younger instruction, decides the pairs it touches.
//
// Start state: all bits 1; for a multi-threaded workload (multi_exec = 0) the
// stack pointer entry is 0 because each thread has its own stack. The stack
// pointer's register number (SP_REG) is this design's choice.
module rst
  import mmt_pkg::*;
#(
  parameter int unsigned NT        = 4,
  parameter int unsigned NUM_AREGS = 50,
  parameter int unsigned SP_REG    = 29,
  localparam int unsigned NP       = num_pairs(NT),
  localparam int unsigned AR_W     = $clog2(NUM_AREGS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   init,
  input  logic                   multi_exec,
  // source reads
  input  logic [1:0][AR_W-1:0]   rd_reg,
  output logic [1:0][NP-1:0]     rd_share,
  // destination update from the split stage
  input  logic                   upd_valid,
  input  logic [AR_W-1:0]        upd_reg,
  input  logic [NT-1:0]          upd_orig_itid,
  input  logic [NT-1:0][NT-1:0]  upd_res_itid,
  // register merging: pairs found identical
  input  logic                   ms_valid,
  input  logic [AR_W-1:0]        ms_reg,
  input  logic [NP-1:0]          ms_pairs,
  // whole table, for observation
  output logic [NUM_AREGS-1:0][NP-1:0] table_o
);
  logic [NUM_AREGS-1:0][NP-1:0] tbl_q;
  logic [NP-1:0] touch, newval;

  assign table_o = tbl_q;

  always_comb begin
    for (int unsigned r = 0; r < 2; r++)
      rd_share[r] = (32'(rd_reg[r]) < NUM_AREGS) ? tbl_q[rd_reg[r]] : '0;
  end

  always_comb begin
    touch  = '0;
    newval = '0;
    for (int unsigned a = 0; a < NT; a++)
      for (int unsigned b = a + 1; b < NT; b++) begin
        touch[pair_index(a, b, NT)] = upd_orig_itid[a] | upd_orig_itid[b];
        for (int unsigned k = 0; k < NT; k++)
          if (upd_res_itid[k][a] && upd_res_itid[k][b]) newval[pair_index(a, b, NT)] = 1'b1;
      end
  end

  logic [NUM_AREGS-1:0][NP-1:0] tbl_d;
  always_comb begin
    tbl_d = tbl_q;
    if (ms_valid && 32'(ms_reg) < NUM_AREGS) tbl_d[ms_reg] = tbl_d[ms_reg] | ms_pairs;
    if (upd_valid && 32'(upd_reg) < NUM_AREGS)
      tbl_d[upd_reg] = (tbl_d[upd_reg] & ~touch) | (newval & touch);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tbl_q <= '1;
    end else if (init) begin
      tbl_q <= '1;
      if (!multi_exec) tbl_q[SP_REG] <= '0;
    end else begin
      tbl_q <= tbl_d;
    end
  end

endmodule
