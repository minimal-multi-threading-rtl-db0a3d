// fetch_sync: shared-fetch and thread re-synchronisation controller.
//
// Holds the PC of every hardware thread and chooses, each cycle, one fetch.
// All threads whose PCs are equal and that are merged with the chosen thread
// are fetched together; the set of them is the fetch's ITID. Every pair of
// threads is in one of three modes (document, Figure 3(a)):
//   MERGE   -> DETECT  : a fetched-together branch sends the two threads to
//                        different next PCs (transition 1);
//   DETECT  -> CATCHUP : a thread's taken-branch target is found in the other
//                        thread's Fetch History Buffer; the thread that found
//                        it is "behind" (transition 2);
//   CATCHUP -> DETECT  : a taken-branch target of the behind thread is not in
//                        the ahead thread's buffer (transition 3);
//   CATCHUP -> MERGE   : the two threads reach the same PC and are fetched
//                        together with equal next PCs (transition 4).
// A thread records its taken-branch targets in its own fhb while it is not
// merged with every active thread. In CATCHUP the behind thread gets the
// highest fetch priority and the ahead thread the lowest; threads of equal
// priority are served round-robin.
//
// This design's choices: one fetch (one ITID) per cycle, the frontend's
// answer for the fetched PC arrives combinationally in the same cycle
// (resp_next_pc/resp_taken, one entry per thread of the ITID), a group
// fetches only when all its threads are ready, nothing is fetched while init
// is high, and for more than two threads the document's two-thread rules are
// applied to every thread pair.
module fetch_sync
  import mmt_pkg::*;
#(
  parameter int unsigned NT          = 4,
  parameter int unsigned PC_W        = 32,
  parameter int unsigned FHB_ENTRIES = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // start all threads at one PC, all pairs merged
  input  logic                    init,
  input  logic [PC_W-1:0]         init_pc,
  input  logic [NT-1:0]           thread_active,
  input  logic [NT-1:0]           thread_ready,
  input  logic                    stall,
  // fetch request
  output logic                    fetch_valid,
  output logic [PC_W-1:0]         fetch_pc,
  output logic [NT-1:0]           fetch_itid,
  output fetch_mode_e             fetch_mode,
  // frontend answer for the fetched PC, per thread of fetch_itid
  input  logic [NT-1:0][PC_W-1:0] resp_next_pc,
  input  logic [NT-1:0]           resp_taken,
  // state and events, for observation
  output logic [NT-1:0][PC_W-1:0] thread_pc,
  output fetch_mode_e             pair_mode [num_pairs(NT)],
  output logic                    ev_diverge,
  output logic                    ev_catchup,
  output logic                    ev_detect_again,
  output logic                    ev_remerge
);
  localparam int unsigned NP   = num_pairs(NT);
  localparam int unsigned TI_W = (NT > 1) ? $clog2(NT) : 1;

  logic [NT-1:0][PC_W-1:0] pc_q;
  fetch_mode_e             mode_q [NP];
  fetch_mode_e             mode_d [NP];
  logic [NP-1:0]           behind_hi_q, behind_hi_d;   // 1: higher-numbered thread is behind
  logic [TI_W-1:0]         rr_q;

  logic [NT-1:0][NT-1:0]   link;
  logic [NT-1:0][NT-1:0]   grp;
  logic [NT-1:0]           behind, ahead, cand;
  logic [NT-1:0][1:0]      cls;
  logic [1:0]              best;
  logic [TI_W-1:0]         sel;
  logic [NT-1:0][NT-1:0]   fhb_hit;    // [owner of buffer][searching thread]
  logic [NT-1:0]           fhb_wr;

  assign thread_pc = pc_q;
  always_comb for (int unsigned p = 0; p < NP; p++) pair_mode[p] = mode_q[p];

  // ---- grouping: threads at the same PC that are merged (or catching up) ----
  always_comb begin
    link   = '0;
    behind = '0;
    ahead  = '0;
    grp    = '0;
    for (int unsigned a = 0; a < NT; a++)
      for (int unsigned b = 0; b < NT; b++)
        if (a != b && thread_active[a] && thread_active[b]) begin
          if (pc_q[a] == pc_q[b] && mode_q[pair_index(a, b, NT)] != MODE_DETECT)
            link[a][b] = 1'b1;
          if (mode_q[pair_index(a, b, NT)] == MODE_CATCHUP) begin
            // a is behind when it is the pair's recorded behind thread
            if ((a > b) == behind_hi_q[pair_index(a, b, NT)]) behind[a] = 1'b1;
            else                                               ahead[a]  = 1'b1;
          end
        end
    for (int unsigned t = 0; t < NT; t++) begin
      grp[t][t] = thread_active[t];
      for (int unsigned it = 0; it < NT; it++)
        for (int unsigned m = 0; m < NT; m++)
          if (grp[t][m]) grp[t] = grp[t] | link[m];
    end
  end

  // ---- fetch priority: behind > normal > ahead, round-robin within a class ----
  always_comb begin
    best = 2'd0;
    sel  = '0;
    for (int unsigned t = 0; t < NT; t++) begin
      cls[t]  = behind[t] ? 2'd2 : (ahead[t] ? 2'd0 : 2'd1);
      cand[t] = !stall && !init && thread_active[t] && ((grp[t] & ~thread_ready) == '0);
      if (cand[t] && cls[t] > best) best = cls[t];
    end
    for (int k = NT - 1; k >= 0; k--)
      if (cand[(int'(rr_q) + k) % NT] && cls[(int'(rr_q) + k) % NT] == best)
        sel = TI_W'((int'(rr_q) + k) % NT);
  end

  assign fetch_valid = |cand;
  assign fetch_pc    = pc_q[sel];
  assign fetch_itid  = fetch_valid ? grp[sel] : '0;

  always_comb begin
    fetch_mode = MODE_DETECT;
    if (fetch_itid == thread_active) fetch_mode = MODE_MERGE;
    else
      for (int unsigned a = 0; a < NT; a++)
        for (int unsigned b = 0; b < NT; b++)
          if (fetch_itid[a] && !fetch_itid[b] && thread_active[b] && a != b &&
              mode_q[pair_index(a, b, NT)] == MODE_CATCHUP)
            fetch_mode = MODE_CATCHUP;
  end

  // ---- fetch history buffers, one per thread ----
  for (genvar g = 0; g < NT; g++) begin : g_fhb
    fhb #(.ENTRIES(FHB_ENTRIES), .PC_W(PC_W), .NSEARCH(NT)) u_fhb (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (init),
      .wr_en    (fhb_wr[g]),
      .wr_pc    (resp_next_pc[g]),
      .search_pc(resp_next_pc),
      .hit      (fhb_hit[g])
    );
  end

  // ---- pair state transitions ----
  always_comb begin
    behind_hi_d     = behind_hi_q;
    fhb_wr          = '0;
    ev_diverge      = 1'b0;
    ev_catchup      = 1'b0;
    ev_detect_again = 1'b0;
    ev_remerge      = 1'b0;
    for (int unsigned p = 0; p < NP; p++) mode_d[p] = mode_q[p];
    if (fetch_valid) begin
      for (int unsigned a = 0; a < NT; a++)
        for (int unsigned b = a + 1; b < NT; b++)
          if (thread_active[a] && thread_active[b]) begin
            if (fetch_itid[a] && fetch_itid[b]) begin
              if (resp_next_pc[a] == resp_next_pc[b]) begin
                mode_d[pair_index(a, b, NT)] = MODE_MERGE;
                if (mode_q[pair_index(a, b, NT)] != MODE_MERGE) ev_remerge = 1'b1;
              end else begin
                mode_d[pair_index(a, b, NT)] = MODE_DETECT;
                ev_diverge = 1'b1;
              end
            end else if (fetch_itid[a] || fetch_itid[b]) begin
              // exactly one of the pair fetched: x = the fetching thread, y = the other
              if (mode_q[pair_index(a, b, NT)] == MODE_DETECT &&
                  (fetch_itid[a] ? (resp_taken[a] && fhb_hit[b][a])
                                 : (resp_taken[b] && fhb_hit[a][b]))) begin
                mode_d[pair_index(a, b, NT)]      = MODE_CATCHUP;
                behind_hi_d[pair_index(a, b, NT)] = fetch_itid[b];
                ev_catchup = 1'b1;
              end else if (mode_q[pair_index(a, b, NT)] == MODE_CATCHUP &&
                           fetch_itid[b] == behind_hi_q[pair_index(a, b, NT)] &&
                           (fetch_itid[a] ? (resp_taken[a] && !fhb_hit[b][a])
                                          : (resp_taken[b] && !fhb_hit[a][b]))) begin
                mode_d[pair_index(a, b, NT)] = MODE_DETECT;
                ev_detect_again = 1'b1;
              end
            end
          end
      // a thread records its target while it is apart from some active thread
      for (int unsigned x = 0; x < NT; x++)
        if (fetch_itid[x] && resp_taken[x])
          for (int unsigned u = 0; u < NT; u++)
            if (u != x && thread_active[u] && mode_d[pair_index(x, u, NT)] != MODE_MERGE)
              fhb_wr[x] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q        <= '0;
      behind_hi_q <= '0;
      rr_q        <= '0;
      for (int unsigned p = 0; p < NP; p++) mode_q[p] <= MODE_MERGE;
    end else if (init) begin
      for (int unsigned t = 0; t < NT; t++) pc_q[t] <= init_pc;
      behind_hi_q <= '0;
      rr_q        <= '0;
      for (int unsigned p = 0; p < NP; p++) mode_q[p] <= MODE_MERGE;
    end else begin
      for (int unsigned p = 0; p < NP; p++) mode_q[p] <= mode_d[p];
      behind_hi_q <= behind_hi_d;
      if (fetch_valid) begin
        for (int unsigned t = 0; t < NT; t++)
          if (fetch_itid[t]) pc_q[t] <= resp_next_pc[t];
        rr_q <= (int'(sel) == NT - 1) ? '0 : sel + 1'b1;
      end
    end
  end

endmodule
