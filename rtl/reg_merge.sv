// reg_merge: register merging at commit.
//
// Threads that run apart (fetch modes DETECT and CATCHUP) write their results
// into different physical registers, so the Register Sharing Table marks those
// registers as different even when the values agree. At commit this unit
// compares the committed value with the same architected register of the
// other threads and, where they are equal, sets the table's pair bits again
// (document, Section 4.2.7). It keeps:
//   - a copy of every thread's architected-to-physical map, written at rename
//     (rn_*), so the rename table needs no extra read ports;
//   - per thread and architected register a bit that is 1 while no renamed,
//     uncommitted instruction writes the register: cleared at rename, set
//     again at commit if the committing instruction's mapping is still valid.
// A committing instruction is checked if it was fetched in DETECT or CATCHUP
// mode, has a destination, and every thread of its ITID still maps the
// destination to the instruction's physical register. For each other thread
// whose bit is 1 the register file is read through that thread's read port;
// a read happens only if the port is granted (rf_gnt), otherwise that thread
// is skipped. Threads whose value equals the committed one are merged with
// the ITID's threads and with each other (ms_pairs, to the table in the same
// cycle).
//
// This design's choices: one commit per cycle, one register-file read port
// per thread with the data returned in the same cycle, and the pend_* input,
// which names an instruction that has already updated the table but not yet
// been renamed (it sits between the split stage and rename); threads it
// writes are treated as having a writer in flight.
module reg_merge
  import mmt_pkg::*;
#(
  parameter int unsigned NT        = 4,
  parameter int unsigned NUM_AREGS = 50,
  parameter int unsigned NUM_PREGS = 256,
  parameter int unsigned XLEN      = 64,
  parameter int unsigned SP_REG    = 29,
  localparam int unsigned NP       = num_pairs(NT),
  localparam int unsigned AR_W     = $clog2(NUM_AREGS),
  localparam int unsigned PR_W     = $clog2(NUM_PREGS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      init,
  input  logic                      multi_exec,
  input  logic                      merge_en,
  // rename writes
  input  logic [NT-1:0]             rn_valid,
  input  logic [NT-1:0][NT-1:0]     rn_itid,
  input  logic [AR_W-1:0]           rn_dst,
  input  logic [NT-1:0][PR_W-1:0]   rn_pdst,
  // instruction past the table but not yet renamed
  input  logic                      pend_valid,
  input  logic [NT-1:0]             pend_threads,
  input  logic [AR_W-1:0]           pend_dst,
  // commit
  input  logic                      cm_valid,
  input  logic [NT-1:0]             cm_itid,
  input  fetch_mode_e               cm_mode,
  input  logic                      cm_dst_valid,
  input  logic [AR_W-1:0]           cm_dst,
  input  logic [PR_W-1:0]           cm_pdst,
  input  logic [XLEN-1:0]           cm_value,
  // register file read ports, one per thread
  output logic [NT-1:0]             rf_req,
  output logic [NT-1:0][PR_W-1:0]   rf_addr,
  input  logic [NT-1:0]             rf_gnt,
  input  logic [NT-1:0][XLEN-1:0]   rf_data,
  // pairs found identical, to the sharing table
  output logic                      ms_valid,
  output logic [AR_W-1:0]           ms_reg,
  output logic [NP-1:0]             ms_pairs,
  output logic                      ev_check
);
  logic [NT-1:0][NUM_AREGS-1:0][PR_W-1:0] copy_q;
  logic [NT-1:0][NUM_AREGS-1:0]           idle_q;   // 1: no writer in flight
  logic [NT-1:0]                          map_ok, match;
  logic                                   valid_map, check;

  always_comb begin
    map_ok    = '0;
    valid_map = cm_valid && cm_dst_valid;
    for (int unsigned t = 0; t < NT; t++) begin
      map_ok[t] = (copy_q[t][cm_dst] == cm_pdst);
      if (cm_itid[t] && !map_ok[t]) valid_map = 1'b0;
      if (cm_itid[t] && pend_valid && pend_threads[t] && pend_dst == cm_dst) valid_map = 1'b0;
    end
    check = valid_map && merge_en && (cm_mode != MODE_MERGE);
  end

  always_comb begin
    for (int unsigned u = 0; u < NT; u++) begin
      rf_addr[u] = copy_q[u][cm_dst];
      rf_req[u]  = check && !cm_itid[u] && idle_q[u][cm_dst] &&
                   !(pend_valid && pend_threads[u] && pend_dst == cm_dst);
      match[u]   = rf_req[u] && rf_gnt[u] && (rf_data[u] == cm_value);
    end
  end

  always_comb begin
    ms_pairs = '0;
    for (int unsigned a = 0; a < NT; a++)
      for (int unsigned b = a + 1; b < NT; b++)
        if ((cm_itid[a] || match[a]) && (cm_itid[b] || match[b]) && (match[a] || match[b]))
          ms_pairs[pair_index(a, b, NT)] = 1'b1;
  end

  assign ms_valid = |match;
  assign ms_reg   = cm_dst;
  assign ev_check = check;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      copy_q <= '0;
      idle_q <= '1;
    end else if (init) begin
      idle_q <= '1;
      for (int unsigned t = 0; t < NT; t++)
        for (int unsigned r = 0; r < NUM_AREGS; r++)
          copy_q[t][r] <= PR_W'(r);
      if (!multi_exec)
        for (int unsigned t = 0; t < NT; t++) copy_q[t][SP_REG] <= PR_W'(NUM_AREGS + t);
    end else begin
      // commit first, so that a rename of the same register in the same cycle wins
      if (cm_valid && cm_dst_valid)
        for (int unsigned t = 0; t < NT; t++)
          if (cm_itid[t] && map_ok[t]) idle_q[t][cm_dst] <= 1'b1;
      for (int unsigned k = 0; k < NT; k++)
        if (rn_valid[k])
          for (int unsigned t = 0; t < NT; t++)
            if (rn_itid[k][t]) begin
              copy_q[t][rn_dst] <= rn_pdst[k];
              idle_q[t][rn_dst] <= 1'b0;
            end
    end
  end

endmodule
