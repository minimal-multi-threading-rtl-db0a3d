// tb_reg_merge: self-checking test of register merging.
// Random uops (random ITIDs, destinations from a few registers so that
// writes collide, values from a small set so that they often agree) are
// renamed and later committed in order, with random fetch modes, read-port
// grants and a random "pending" instruction between split and rename. A
// reference follows the rules: check only DETECT/CATCHUP instructions whose
// mapping is still valid in every thread; read only threads with no writer in
// flight; merge the threads whose value equals the committed one. Expected
// read requests, addresses and merged pairs are compared every cycle.
module tb_reg_merge;
  import mmt_pkg::*;
  localparam int unsigned NT = 4, NA = 50, NPR = 256, XLEN = 64, SP = 29;
  localparam int unsigned NP = num_pairs(NT), AR_W = $clog2(NA), PR_W = $clog2(NPR);

  logic clk = 0, rst_n = 0, init = 0, multi_exec = 1, merge_en = 1;
  logic [NT-1:0] rn_valid = '0;
  logic [NT-1:0][NT-1:0] rn_itid = '0;
  logic [AR_W-1:0] rn_dst = '0;
  logic [NT-1:0][PR_W-1:0] rn_pdst = '0;
  logic pend_valid = 0;
  logic [NT-1:0] pend_threads = '0;
  logic [AR_W-1:0] pend_dst = '0;
  logic cm_valid = 0;
  logic [NT-1:0] cm_itid = '0;
  fetch_mode_e cm_mode = MODE_DETECT;
  logic cm_dst_valid = 1;
  logic [AR_W-1:0] cm_dst = '0;
  logic [PR_W-1:0] cm_pdst = '0;
  logic [XLEN-1:0] cm_value = '0;
  logic [NT-1:0] rf_req, rf_gnt = '1;
  logic [NT-1:0][PR_W-1:0] rf_addr;
  logic [NT-1:0][XLEN-1:0] rf_data;
  logic ms_valid;
  logic [AR_W-1:0] ms_reg;
  logic [NP-1:0] ms_pairs;
  logic ev_check;

  reg_merge #(.NT(NT), .NUM_AREGS(NA), .NUM_PREGS(NPR), .XLEN(XLEN), .SP_REG(SP)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, merges = 0, checked = 0, blocked = 0;
  int copy [NT][NA];
  bit idle [NT][NA];
  logic [XLEN-1:0] rf [NPR];
  typedef struct { logic [NT-1:0] itid; int dst; int pdst; logic [XLEN-1:0] val; fetch_mode_e mode; } uop_t;
  uop_t fifo [$];
  int next_p = 60;

  always_comb for (int u = 0; u < NT; u++) rf_data[u] = rf[rf_addr[u]];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    for (int p = 0; p < NPR; p++) rf[p] = XLEN'(p % 4);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int t = 0; t < NT; t++)
      for (int r = 0; r < NA; r++) begin copy[t][r] = r; idle[t][r] = 1; end
    for (int n = 0; n < 6000; n++) begin
      uop_t c, r;
      bit do_cm, do_rn, valid_map, chk_on;
      logic [NT-1:0] req, match, okm;
      logic [NP-1:0] pairs;
      // commit the oldest uop, rename a new one
      do_cm = fifo.size() > 0 && ($urandom_range(0, 2) != 0 || fifo.size() > 6);
      do_rn = $urandom_range(0, 1);
      cm_valid = do_cm;
      if (do_cm) begin
        c = fifo[0];
        cm_itid = c.itid; cm_dst = AR_W'(c.dst); cm_pdst = PR_W'(c.pdst); cm_value = c.val;
        cm_mode = c.mode;
      end
      rn_valid = '0; rn_itid = '0;
      if (do_rn) begin
        r.itid = NT'($urandom_range(1, 15));
        r.dst = $urandom_range(0, 3);
        r.pdst = next_p;
        next_p = (next_p == 250) ? 60 : next_p + 1;
        r.val = XLEN'($urandom_range(0, 2));
        case ($urandom_range(0, 2))
          0: r.mode = MODE_MERGE;
          1: r.mode = MODE_DETECT;
          default: r.mode = MODE_CATCHUP;
        endcase
        rn_valid[0] = 1; rn_itid[0] = r.itid; rn_dst = AR_W'(r.dst); rn_pdst[0] = PR_W'(r.pdst);
      end
      pend_valid = ($urandom_range(0, 3) == 0);
      pend_threads = NT'($urandom_range(1, 15));
      pend_dst = AR_W'($urandom_range(0, 3));
      rf_gnt = NT'($urandom_range(0, 15)) | NT'($urandom_range(0, 1) ? 4'hf : 4'h0);
      #1;
      // reference
      valid_map = do_cm;
      okm = '0;
      req = '0; match = '0; pairs = '0;
      if (do_cm) begin
        for (int t = 0; t < NT; t++) begin
          okm[t] = (copy[t][c.dst] == c.pdst);
          if (c.itid[t] && !okm[t]) valid_map = 0;
          if (c.itid[t] && pend_valid && pend_threads[t] && pend_dst == c.dst) valid_map = 0;
        end
        chk_on = valid_map && c.mode != MODE_MERGE;
        for (int u = 0; u < NT; u++) begin
          req[u] = chk_on && !c.itid[u] && idle[u][c.dst] &&
                   !(pend_valid && pend_threads[u] && pend_dst == c.dst);
          match[u] = req[u] && rf_gnt[u] && rf[copy[u][c.dst]] == c.val;
        end
        for (int a = 0; a < NT; a++)
          for (int b = a + 1; b < NT; b++)
            if ((c.itid[a] | match[a]) && (c.itid[b] | match[b]) && (match[a] | match[b]))
              pairs[pair_index(a, b, NT)] = 1;
        if (chk_on) checked++;
        if (do_cm && c.mode != MODE_MERGE && !valid_map) blocked++;
      end
      chk(rf_req == req, $sformatf("rf_req %b expected %b", rf_req, req));
      for (int u = 0; u < NT; u++)
        if (req[u]) chk(rf_addr[u] == PR_W'(copy[u][c.dst]), "rf_addr");
      chk(ms_valid == (match != 0), "ms_valid");
      if (match != 0) begin
        chk(ms_pairs == pairs && ms_reg == AR_W'(c.dst), $sformatf("ms_pairs %b expected %b", ms_pairs, pairs));
        merges++;
      end
      @(posedge clk);
      #1;
      if (do_cm) begin
        for (int t = 0; t < NT; t++) if (c.itid[t] && okm[t]) idle[t][c.dst] = 1;
        void'(fifo.pop_front());
      end
      if (do_rn) begin
        for (int t = 0; t < NT; t++)
          if (r.itid[t]) begin copy[t][r.dst] = r.pdst; idle[t][r.dst] = 0; end
        rf[r.pdst] = r.val;
        fifo.push_back(r);
      end
      @(negedge clk);
    end
    chk(merges > 0, "no register merged");
    chk(blocked > 0, "no check blocked by an invalid mapping");
    $display("checked %0d commits, %0d merged, %0d blocked", checked, merges, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
