// split_stage: the pipeline stage MMT adds between decode and register rename.
//
// An instruction arrives with the ITID of the threads it was fetched for. The
// stage reads the Register Sharing Table entries of its (up to two) source
// registers, ANDs them into one sharing bit per thread pair and lets
// inst_split produce the minimal set of ITIDs. Rules (document, Table 2):
//   - ALU ops, branches, stores: split only where sources are not shared;
//   - loads of a multi-threaded workload: the same (memory is shared);
//   - loads of a multi-execution workload (multi_exec = 1): also consult the
//     LVIP; if it predicts different values the load is split per thread.
// In the same cycle the table entry of the destination register is updated
// from the split result. The split instructions leave through a register one
// cycle later, together (out_itid[k] valid for k < out_count), so the stage
// adds one cycle of latency and takes one instruction per cycle.
//
// Handshake (this design's choice): in_valid/in_ready and out_valid/out_ready;
// a transfer happens when both are high. The table and predictor updates from
// register merging (ms_*) and from the load/store queue (lv_upd_*) pass
// through to rst and lvip. init restarts the stage and the table; the
// predictor is emptied only by lvip_clear, so it keeps what it learned across
// a restart of the threads.
// An assertion checks every transfer: the output ITIDs partition the input
// ITID. Its disable on reset makes lint report rst_n as used both as an
// asynchronous reset and synchronously; that use is only in the assertion.
module split_stage
  import mmt_pkg::*;
#(
  parameter int unsigned NT           = 4,
  parameter int unsigned PC_W         = 32,
  parameter int unsigned NUM_AREGS    = 50,
  parameter int unsigned SP_REG       = 29,
  parameter int unsigned LVIP_ENTRIES = 4096,
  localparam int unsigned NP          = num_pairs(NT),
  localparam int unsigned AR_W        = $clog2(NUM_AREGS),
  localparam int unsigned CN_W        = $clog2(NT + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   init,
  input  logic                   lvip_clear,
  input  logic                   multi_exec,
  // decoded instruction
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [PC_W-1:0]        in_pc,
  input  logic [NT-1:0]          in_itid,
  input  fetch_mode_e            in_mode,
  input  op_class_e              in_op,
  input  logic [1:0]             in_src_valid,
  input  logic [1:0][AR_W-1:0]   in_src,
  input  logic                   in_dst_valid,
  input  logic [AR_W-1:0]        in_dst,
  // split instructions
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [PC_W-1:0]        out_pc,
  output fetch_mode_e            out_mode,
  output op_class_e              out_op,
  output logic [1:0]             out_src_valid,
  output logic [1:0][AR_W-1:0]   out_src,
  output logic                   out_dst_valid,
  output logic [AR_W-1:0]        out_dst,
  output logic [NT-1:0][NT-1:0]  out_itid,
  output logic [CN_W-1:0]        out_count,
  output logic                   out_lvip_identical,
  // register merging -> RST
  input  logic                   ms_valid,
  input  logic [AR_W-1:0]        ms_reg,
  input  logic [NP-1:0]          ms_pairs,
  // load/store queue -> LVIP
  input  logic                   lv_upd_valid,
  input  logic [PC_W-1:0]        lv_upd_pc,
  output logic [NUM_AREGS-1:0][NP-1:0] rst_table
);
  logic [1:0][NP-1:0]    rd_share;
  logic [NP-1:0]         pair_share;
  logic                  lk_identical, force_split, accept;
  logic [NT-1:0][NT-1:0] sp_itid;
  logic [NT-1:0]         sp_valid;
  logic [CN_W-1:0]       sp_count;

  assign in_ready = !out_valid || out_ready;
  assign accept   = in_valid && in_ready;

  rst #(.NT(NT), .NUM_AREGS(NUM_AREGS), .SP_REG(SP_REG)) u_rst (
    .clk, .rst_n, .init, .multi_exec,
    .rd_reg       (in_src),
    .rd_share     (rd_share),
    .upd_valid    (accept && in_dst_valid),
    .upd_reg      (in_dst),
    .upd_orig_itid(in_itid),
    .upd_res_itid (sp_itid),
    .ms_valid, .ms_reg, .ms_pairs,
    .table_o      (rst_table)
  );

  lvip #(.ENTRIES(LVIP_ENTRIES), .PC_W(PC_W)) u_lvip (
    .clk, .rst_n,
    .init        (lvip_clear),
    .lk_pc       (in_pc),
    .lk_identical(lk_identical),
    .upd_valid   (lv_upd_valid),
    .upd_pc      (lv_upd_pc)
  );

  assign pair_share  = (in_src_valid[0] ? rd_share[0] : '1) & (in_src_valid[1] ? rd_share[1] : '1);
  assign force_split = (in_op == OP_LOAD) && multi_exec && !lk_identical;

  inst_split #(.NT(NT)) u_split (
    .itid       (in_itid),
    .pair_share (pair_share),
    .force_split(force_split),
    .out_itid   (sp_itid),
    .out_valid  (sp_valid),
    .out_count  (sp_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid          <= 1'b0;
      out_pc             <= '0;
      out_mode           <= MODE_MERGE;
      out_op             <= OP_ALU;
      out_src_valid      <= '0;
      out_src            <= '0;
      out_dst_valid      <= 1'b0;
      out_dst            <= '0;
      out_itid           <= '0;
      out_count          <= '0;
      out_lvip_identical <= 1'b1;
    end else if (init) begin
      out_valid <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_pc             <= in_pc;
        out_mode           <= in_mode;
        out_op             <= in_op;
        out_src_valid      <= in_src_valid;
        out_src            <= in_src;
        out_dst_valid      <= in_dst_valid;
        out_dst            <= in_dst;
        out_itid           <= sp_itid;
        out_count          <= sp_count;
        out_lvip_identical <= !force_split;
      end
    end
  end

  // the split ITIDs never overlap, together cover the fetched ITID, and an
  // output is valid exactly when its ITID is not empty
  logic [NT-1:0] sp_union;
  logic          sp_overlap, sp_valid_bad;
  always_comb begin
    sp_union     = '0;
    sp_overlap   = 1'b0;
    sp_valid_bad = 1'b0;
    for (int unsigned k = 0; k < NT; k++) begin
      if ((sp_union & sp_itid[k]) != '0) sp_overlap = 1'b1;
      if (sp_valid[k] != (sp_itid[k] != '0)) sp_valid_bad = 1'b1;
      sp_union = sp_union | sp_itid[k];
    end
  end
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> !sp_overlap && !sp_valid_bad && sp_union == in_itid)
    else $error("split ITIDs do not partition the fetched ITID");

endmodule
