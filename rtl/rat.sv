// rat: register alias table extended for instructions shared by threads.
//
// It keeps one architected-to-physical map per thread. An instruction leaving
// the split stage is a group of up to NT uops with disjoint ITIDs. For each
// uop the sources are read once, from the map of the lowest thread of its
// ITID (all its threads map them to the same register, which is why it was
// not split), one physical destination is allocated, and that register is
// written into the map of every thread of the ITID (document, Section 4.2.4).
// Each thread's previous mapping of the destination is passed on (old_pdst)
// so that commit can release it.
//
// Timing: the whole group is renamed in the cycle it is accepted and leaves
// through a register one cycle later. The group is held back (in_ready low)
// while the output register is full or there are not enough free physical
// registers: this is the rename stall. The reg-merging copy of the maps is
// fed from rn_* in the cycle of the rename. Start state as in preg_state.
module rat
  import mmt_pkg::*;
#(
  parameter int unsigned NT        = 4,
  parameter int unsigned PC_W      = 32,
  parameter int unsigned NUM_AREGS = 50,
  parameter int unsigned NUM_PREGS = 256,
  parameter int unsigned SP_REG    = 29,
  localparam int unsigned AR_W     = $clog2(NUM_AREGS),
  localparam int unsigned PR_W     = $clog2(NUM_PREGS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          init,
  input  logic                          multi_exec,
  // group from the split stage
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [PC_W-1:0]               in_pc,
  input  fetch_mode_e                   in_mode,
  input  op_class_e                     in_op,
  input  logic [1:0]                    in_src_valid,
  input  logic [1:0][AR_W-1:0]          in_src,
  input  logic                          in_dst_valid,
  input  logic [AR_W-1:0]               in_dst,
  input  logic [NT-1:0][NT-1:0]         in_itid,
  input  logic                          in_lvip_identical,
  // physical register allocation (preg_state)
  output logic [NT-1:0]                 alloc_req,
  input  logic [NT-1:0][PR_W-1:0]       alloc_preg,
  input  logic                          alloc_ok,
  output logic [NT-1:0]                 alloc_fire,
  // rename writes, for the reg-merging map copy
  output logic [NT-1:0]                 rn_valid,
  output logic [NT-1:0][NT-1:0]         rn_itid,
  output logic [AR_W-1:0]               rn_dst,
  output logic [NT-1:0][PR_W-1:0]       rn_pdst,
  // renamed group
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [PC_W-1:0]               out_pc,
  output fetch_mode_e                   out_mode,
  output op_class_e                     out_op,
  output logic [NT-1:0][NT-1:0]         out_itid,
  output logic [1:0]                    out_src_valid,
  output logic [NT-1:0][1:0][PR_W-1:0]  out_psrc,
  output logic                          out_dst_valid,
  output logic [AR_W-1:0]               out_dst,
  output logic [NT-1:0][PR_W-1:0]       out_pdst,
  output logic [NT-1:0][PR_W-1:0]       out_old_pdst,   // indexed by thread
  output logic                          out_lvip_identical
);
  logic [NT-1:0][NUM_AREGS-1:0][PR_W-1:0] map_q;
  logic                                   fire;
  logic [NT-1:0][1:0][PR_W-1:0]           psrc;
  logic [NT-1:0][PR_W-1:0]                old_pdst;

  always_comb begin
    for (int unsigned k = 0; k < NT; k++)
      alloc_req[k] = in_valid && in_dst_valid && (in_itid[k] != '0);
  end

  assign in_ready   = (!out_valid || out_ready) && (alloc_ok || !in_dst_valid);
  assign fire       = in_valid && in_ready;
  assign alloc_fire = fire ? alloc_req : '0;

  // source lookup from the lowest thread of each uop's ITID
  always_comb begin
    psrc = '0;
    for (int unsigned k = 0; k < NT; k++)
      for (int t = NT - 1; t >= 0; t--)
        if (in_itid[k][t])
          for (int unsigned s = 0; s < 2; s++)
            psrc[k][s] = map_q[t][in_src[s]];
    for (int unsigned t = 0; t < NT; t++) old_pdst[t] = map_q[t][in_dst];
  end

  assign rn_valid = alloc_fire;
  assign rn_itid  = in_itid;
  assign rn_dst   = in_dst;
  assign rn_pdst  = alloc_preg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_q <= '0;
    end else if (init) begin
      for (int unsigned t = 0; t < NT; t++)
        for (int unsigned r = 0; r < NUM_AREGS; r++)
          map_q[t][r] <= PR_W'(r);
      if (!multi_exec)
        for (int unsigned t = 0; t < NT; t++) map_q[t][SP_REG] <= PR_W'(NUM_AREGS + t);
    end else if (fire && in_dst_valid) begin
      for (int unsigned k = 0; k < NT; k++)
        for (int unsigned t = 0; t < NT; t++)
          if (in_itid[k][t]) map_q[t][in_dst] <= alloc_preg[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid          <= 1'b0;
      out_pc             <= '0;
      out_mode           <= MODE_MERGE;
      out_op             <= OP_ALU;
      out_itid           <= '0;
      out_src_valid      <= '0;
      out_psrc           <= '0;
      out_dst_valid      <= 1'b0;
      out_dst            <= '0;
      out_pdst           <= '0;
      out_old_pdst       <= '0;
      out_lvip_identical <= 1'b1;
    end else if (init) begin
      out_valid <= 1'b0;
    end else if (!out_valid || out_ready) begin
      out_valid <= fire;
      if (fire) begin
        out_pc             <= in_pc;
        out_mode           <= in_mode;
        out_op             <= in_op;
        out_itid           <= in_itid;
        out_src_valid      <= in_src_valid;
        out_psrc           <= psrc;
        out_dst_valid      <= in_dst_valid;
        out_dst            <= in_dst;
        out_pdst           <= alloc_preg;
        out_old_pdst       <= old_pdst;
        out_lvip_identical <= in_lvip_identical;
      end
    end
  end

endmodule
