// mmt_core: the Minimal Multi-Threading additions to an SMT core, wired as
// one pipeline slice: fetch -> decode register -> split -> rename -> (issue,
// execute: outside) -> commit.
//
//   fetch_sync   picks one fetch per cycle; threads at the same PC that are
//                merged share it (ITID); keeps the MERGE/DETECT/CATCHUP state
//                of every thread pair with one Fetch History Buffer per thread.
//   split_stage  Register Sharing Table + LVIP + splitter: the fetched
//                instruction becomes 1..NT uops, one per group of threads
//                whose sources are identical.
//   rat          one map per thread; a uop's destination register is written
//                into the map of every thread of its ITID.
//   preg_state   owner threads of each physical register, allocation/release.
//   reg_merge    at commit, compares a DETECT/CATCHUP-fetched result with the
//                other threads' same architected register and re-marks equal
//                ones as shared in the table.
//   lsq_split    expands loads/stores of multi-execution workloads per thread,
//                checks LVIP predictions.
//
// The frontend (instruction memory/trace cache, branch prediction, decode),
// the issue queue, execution units, physical register file, reorder buffer and
// memories are the unchanged parts of the SMT core and are outside, reached
// through the ports below. The frontend answers a fetch combinationally: for
// fetch_pc it returns the decoded instruction (fe_*) and, per thread of
// fetch_itid, the next PC and whether a taken branch led there. The renamed
// group (ren_*) is handed out with a valid/ready handshake; commits come back
// one per cycle on cm_*; the execution engine sends memory accesses on ls_* and
// gets them back on ls_done_*. An LVIP misprediction raises rollback for one
// cycle; recovering the pipeline is the outside core's job (init restarts
// all threads from init_pc and keeps the LVIP unless lvip_clear is given).
//
// Left open on purpose: fetch_sync's per-thread PCs (thread_pc), the split
// count and lsq_split's done_store, which the top does not need. Lint's note
// that rst_n is used synchronously comes from the assertion in split_stage.
//
// Timing: an instruction fetched in cycle n is offered on ren_* in cycle n+3
// (decode register, split stage register, rename output register) when
// nothing stalls; a full decode register stalls fetch.
//
// One instruction per cycle is fetched, split and renamed; the document's core
// is 8 wide. Parameters default to the document's configuration (4 threads,
// 32-entry history buffers, 4K-entry LVIP, 50 architected and 256 physical
// registers); XLEN and the stack pointer number are this design's choice.
module mmt_core
  import mmt_pkg::*;
#(
  parameter int unsigned NT           = 4,
  parameter int unsigned PC_W         = 32,
  parameter int unsigned FHB_ENTRIES  = 32,
  parameter int unsigned NUM_AREGS    = 50,
  parameter int unsigned NUM_PREGS    = 256,
  parameter int unsigned LVIP_ENTRIES = 4096,
  parameter int unsigned XLEN         = 64,
  parameter int unsigned SP_REG       = 29,
  localparam int unsigned NP          = num_pairs(NT),
  localparam int unsigned AR_W        = $clog2(NUM_AREGS),
  localparam int unsigned PR_W        = $clog2(NUM_PREGS),
  localparam int unsigned TI_W        = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration
  input  logic                          init,
  input  logic                          lvip_clear,
  input  logic [PC_W-1:0]               init_pc,
  input  logic                          multi_exec,
  input  logic                          merge_en,
  input  logic [NT-1:0]                 thread_active,
  input  logic [NT-1:0]                 thread_ready,
  // fetch
  output logic                          fetch_valid,
  output logic [PC_W-1:0]               fetch_pc,
  output logic [NT-1:0]                 fetch_itid,
  output fetch_mode_e                   fetch_mode,
  input  logic [NT-1:0][PC_W-1:0]       fe_next_pc,
  input  logic [NT-1:0]                 fe_taken,
  input  op_class_e                     fe_op,
  input  logic [1:0]                    fe_src_valid,
  input  logic [1:0][AR_W-1:0]          fe_src,
  input  logic                          fe_dst_valid,
  input  logic [AR_W-1:0]               fe_dst,
  // renamed group to issue
  output logic                          ren_valid,
  input  logic                          ren_ready,
  output logic [PC_W-1:0]               ren_pc,
  output fetch_mode_e                   ren_mode,
  output op_class_e                     ren_op,
  output logic [NT-1:0][NT-1:0]         ren_itid,
  output logic [1:0]                    ren_src_valid,
  output logic [NT-1:0][1:0][PR_W-1:0]  ren_psrc,
  output logic                          ren_dst_valid,
  output logic [AR_W-1:0]               ren_dst,
  output logic [NT-1:0][PR_W-1:0]       ren_pdst,
  output logic [NT-1:0][PR_W-1:0]       ren_old_pdst,
  output logic                          ren_lvip_identical,
  // commit, one uop per cycle
  input  logic                          cm_valid,
  input  logic [NT-1:0]                 cm_itid,
  input  fetch_mode_e                   cm_mode,
  input  logic                          cm_dst_valid,
  input  logic [AR_W-1:0]               cm_dst,
  input  logic [PR_W-1:0]               cm_pdst,
  input  logic [NT-1:0][PR_W-1:0]       cm_old_pdst,
  input  logic [XLEN-1:0]               cm_value,
  // register file read ports for register merging
  output logic [NT-1:0]                 rf_req,
  output logic [NT-1:0][PR_W-1:0]       rf_addr,
  input  logic [NT-1:0]                 rf_gnt,
  input  logic [NT-1:0][XLEN-1:0]       rf_data,
  // load/store accesses
  input  logic                          ls_valid,
  output logic                          ls_ready,
  input  logic [NT-1:0]                 ls_itid,
  input  logic                          ls_store,
  input  logic [XLEN-1:0]               ls_addr,
  input  logic [XLEN-1:0]               ls_wdata,
  input  logic [PC_W-1:0]               ls_pc,
  input  logic                          ls_lvip_identical,
  input  logic [PR_W-1:0]               ls_tag,
  output logic                          mem_req_valid,
  input  logic                          mem_req_ready,
  output logic [TI_W-1:0]               mem_req_tid,
  output logic                          mem_req_we,
  output logic [XLEN-1:0]               mem_req_addr,
  output logic [XLEN-1:0]               mem_req_wdata,
  input  logic                          mem_resp_valid,
  input  logic [XLEN-1:0]               mem_resp_data,
  output logic                          ls_done_valid,
  output logic [NT-1:0]                 ls_done_itid,
  output logic [PR_W-1:0]               ls_done_tag,
  output logic [NT-1:0][XLEN-1:0]       ls_done_data,
  output logic                          rollback,
  // observation
  output fetch_mode_e                   pair_mode [NP],
  output logic [NUM_AREGS-1:0][NP-1:0]  rst_table,
  output logic [PR_W:0]                 free_pregs,
  output logic [3:0]                    ev_fetch,    // diverge, catchup, detect-again, remerge
  output logic                          ev_merge_check,
  output logic                          ev_merge_hit
);
  // ---------------- fetch and the decode register ----------------
  logic                  dec_valid_q, split_in_ready, fetch_stall;
  logic [PC_W-1:0]       dec_pc_q;
  logic [NT-1:0]         dec_itid_q;
  fetch_mode_e           dec_mode_q;
  op_class_e             dec_op_q;
  logic [1:0]            dec_src_valid_q;
  logic [1:0][AR_W-1:0]  dec_src_q;
  logic                  dec_dst_valid_q;
  logic [AR_W-1:0]       dec_dst_q;

  assign fetch_stall = dec_valid_q && !split_in_ready;

  fetch_sync #(.NT(NT), .PC_W(PC_W), .FHB_ENTRIES(FHB_ENTRIES)) u_fetch (
    .clk, .rst_n, .init, .init_pc, .thread_active, .thread_ready,
    .stall          (fetch_stall),
    .fetch_valid, .fetch_pc, .fetch_itid, .fetch_mode,
    .resp_next_pc   (fe_next_pc),
    .resp_taken     (fe_taken),
    .thread_pc      (),
    .pair_mode      (pair_mode),
    .ev_diverge     (ev_fetch[0]),
    .ev_catchup     (ev_fetch[1]),
    .ev_detect_again(ev_fetch[2]),
    .ev_remerge     (ev_fetch[3])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid_q     <= 1'b0;
      dec_pc_q        <= '0;
      dec_itid_q      <= '0;
      dec_mode_q      <= MODE_MERGE;
      dec_op_q        <= OP_ALU;
      dec_src_valid_q <= '0;
      dec_src_q       <= '0;
      dec_dst_valid_q <= 1'b0;
      dec_dst_q       <= '0;
    end else if (init) begin
      dec_valid_q <= 1'b0;
    end else if (!fetch_stall) begin
      dec_valid_q <= fetch_valid;
      if (fetch_valid) begin
        dec_pc_q        <= fetch_pc;
        dec_itid_q      <= fetch_itid;
        dec_mode_q      <= fetch_mode;
        dec_op_q        <= fe_op;
        dec_src_valid_q <= fe_src_valid;
        dec_src_q       <= fe_src;
        dec_dst_valid_q <= fe_dst_valid;
        dec_dst_q       <= fe_dst;
      end
    end
  end

  // ---------------- split stage ----------------
  logic                  sp_valid, sp_ready;
  logic [PC_W-1:0]       sp_pc;
  fetch_mode_e           sp_mode;
  op_class_e             sp_op;
  logic [1:0]            sp_src_valid;
  logic [1:0][AR_W-1:0]  sp_src;
  logic                  sp_dst_valid;
  logic [AR_W-1:0]       sp_dst;
  logic [NT-1:0][NT-1:0] sp_itid;
  logic                  sp_lvip_identical;
  logic                  ms_valid;
  logic [AR_W-1:0]       ms_reg;
  logic [NP-1:0]         ms_pairs;
  logic                  ls_misp;
  logic [PC_W-1:0]       ls_misp_pc;
  logic [NT-1:0]         sp_threads;

  split_stage #(.NT(NT), .PC_W(PC_W), .NUM_AREGS(NUM_AREGS), .SP_REG(SP_REG),
                .LVIP_ENTRIES(LVIP_ENTRIES)) u_split (
    .clk, .rst_n, .init, .lvip_clear, .multi_exec,
    .in_valid     (dec_valid_q),
    .in_ready     (split_in_ready),
    .in_pc        (dec_pc_q),
    .in_itid      (dec_itid_q),
    .in_mode      (dec_mode_q),
    .in_op        (dec_op_q),
    .in_src_valid (dec_src_valid_q),
    .in_src       (dec_src_q),
    .in_dst_valid (dec_dst_valid_q),
    .in_dst       (dec_dst_q),
    .out_valid    (sp_valid),
    .out_ready    (sp_ready),
    .out_pc       (sp_pc),
    .out_mode     (sp_mode),
    .out_op       (sp_op),
    .out_src_valid(sp_src_valid),
    .out_src      (sp_src),
    .out_dst_valid(sp_dst_valid),
    .out_dst      (sp_dst),
    .out_itid     (sp_itid),
    .out_count    (),
    .out_lvip_identical(sp_lvip_identical),
    .ms_valid, .ms_reg, .ms_pairs,
    .lv_upd_valid (ls_misp),
    .lv_upd_pc    (ls_misp_pc),
    .rst_table    (rst_table)
  );

  always_comb begin
    sp_threads = '0;
    for (int unsigned k = 0; k < NT; k++) sp_threads = sp_threads | sp_itid[k];
  end

  // ---------------- rename ----------------
  logic [NT-1:0]            alloc_req, alloc_fire;
  logic [NT-1:0][PR_W-1:0]  alloc_preg;
  logic                     alloc_ok;
  logic [NT-1:0]            rn_valid;
  logic [NT-1:0][NT-1:0]    rn_itid;
  logic [AR_W-1:0]          rn_dst;
  logic [NT-1:0][PR_W-1:0]  rn_pdst;

  rat #(.NT(NT), .PC_W(PC_W), .NUM_AREGS(NUM_AREGS), .NUM_PREGS(NUM_PREGS),
        .SP_REG(SP_REG)) u_rat (
    .clk, .rst_n, .init, .multi_exec,
    .in_valid          (sp_valid),
    .in_ready          (sp_ready),
    .in_pc             (sp_pc),
    .in_mode           (sp_mode),
    .in_op             (sp_op),
    .in_src_valid      (sp_src_valid),
    .in_src            (sp_src),
    .in_dst_valid      (sp_dst_valid),
    .in_dst            (sp_dst),
    .in_itid           (sp_itid),
    .in_lvip_identical (sp_lvip_identical),
    .alloc_req, .alloc_preg, .alloc_ok, .alloc_fire,
    .rn_valid, .rn_itid, .rn_dst, .rn_pdst,
    .out_valid         (ren_valid),
    .out_ready         (ren_ready),
    .out_pc            (ren_pc),
    .out_mode          (ren_mode),
    .out_op            (ren_op),
    .out_itid          (ren_itid),
    .out_src_valid     (ren_src_valid),
    .out_psrc          (ren_psrc),
    .out_dst_valid     (ren_dst_valid),
    .out_dst           (ren_dst),
    .out_pdst          (ren_pdst),
    .out_old_pdst      (ren_old_pdst),
    .out_lvip_identical(ren_lvip_identical)
  );

  preg_state #(.NT(NT), .NUM_AREGS(NUM_AREGS), .NUM_PREGS(NUM_PREGS), .SP_REG(SP_REG)) u_preg (
    .clk, .rst_n, .init, .multi_exec, .thread_active,
    .alloc_req, .alloc_preg, .alloc_ok, .alloc_fire,
    .alloc_owner(sp_itid),
    .rel_valid  (cm_valid && cm_dst_valid),
    .rel_itid   (cm_itid),
    .rel_old    (cm_old_pdst),
    .free_count (free_pregs)
  );

  // ---------------- register merging at commit ----------------
  reg_merge #(.NT(NT), .NUM_AREGS(NUM_AREGS), .NUM_PREGS(NUM_PREGS), .XLEN(XLEN),
              .SP_REG(SP_REG)) u_merge (
    .clk, .rst_n, .init, .multi_exec, .merge_en,
    .rn_valid, .rn_itid, .rn_dst, .rn_pdst,
    .pend_valid  (sp_valid && sp_dst_valid),
    .pend_threads(sp_threads),
    .pend_dst    (sp_dst),
    .cm_valid, .cm_itid, .cm_mode, .cm_dst_valid, .cm_dst, .cm_pdst, .cm_value,
    .rf_req, .rf_addr, .rf_gnt, .rf_data,
    .ms_valid, .ms_reg, .ms_pairs,
    .ev_check    (ev_merge_check)
  );

  // ---------------- load/store expansion ----------------
  lsq_split #(.NT(NT), .XLEN(XLEN), .PC_W(PC_W), .TAG_W(PR_W)) u_lsq (
    .clk, .rst_n, .multi_exec,
    .in_valid         (ls_valid),
    .in_ready         (ls_ready),
    .in_itid          (ls_itid),
    .in_store         (ls_store),
    .in_addr          (ls_addr),
    .in_wdata         (ls_wdata),
    .in_pc            (ls_pc),
    .in_lvip_identical(ls_lvip_identical),
    .in_tag           (ls_tag),
    .mem_req_valid, .mem_req_ready, .mem_req_tid, .mem_req_we, .mem_req_addr,
    .mem_req_wdata, .mem_resp_valid, .mem_resp_data,
    .done_valid       (ls_done_valid),
    .done_itid        (ls_done_itid),
    .done_tag         (ls_done_tag),
    .done_store       (),
    .done_data        (ls_done_data),
    .misp             (ls_misp),
    .misp_pc          (ls_misp_pc)
  );

  assign rollback     = ls_misp;
  assign ev_merge_hit = ms_valid;

endmodule
