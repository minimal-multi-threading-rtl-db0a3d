// tb_rst: self-checking test of the Register Sharing Table.
// A reference copy of the table is kept per thread pair. Random split updates
// (an ITID cut into random groups) and register-merging sets, sometimes to
// the same register in the same cycle, are applied to both; the whole table
// and the two read ports are compared every cycle. Also checks the start
// state of both workload kinds (stack pointer entry 0 for multi-threaded).
module tb_rst;
  import mmt_pkg::*;
  localparam int unsigned NT = 4, NA = 50, SP = 29;
  localparam int unsigned NP = num_pairs(NT);
  localparam int unsigned AR_W = $clog2(NA);

  logic clk = 0, rst_n = 0, init = 0, multi_exec = 1;
  logic [1:0][AR_W-1:0] rd_reg = '0;
  logic [1:0][NP-1:0] rd_share;
  logic upd_valid = 0; logic [AR_W-1:0] upd_reg = '0; logic [NT-1:0] upd_orig_itid = '0;
  logic [NT-1:0][NT-1:0] upd_res_itid = '0;
  logic ms_valid = 0; logic [AR_W-1:0] ms_reg = '0; logic [NP-1:0] ms_pairs = '0;
  logic [NA-1:0][NP-1:0] table_o;
  int checks = 0, failures = 0;
  bit model [NA][NT][NT];

  rst #(.NT(NT), .NUM_AREGS(NA), .SP_REG(SP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_init(bit me);
    for (int r = 0; r < NA; r++)
      for (int a = 0; a < NT; a++)
        for (int b = 0; b < NT; b++) model[r][a][b] = (me || r != SP);
  endtask

  task automatic compare();
    for (int r = 0; r < NA; r++)
      for (int a = 0; a < NT; a++)
        for (int b = a + 1; b < NT; b++) begin
          checks++;
          if (table_o[r][pair_index(a, b, NT)] !== model[r][a][b]) begin
            failures++;
            $display("FAIL reg %0d pair %0d%0d dut=%0b model=%0b", r, a, b,
                     table_o[r][pair_index(a, b, NT)], model[r][a][b]);
          end
        end
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (rd_share[p] !== table_o[rd_reg[p]]) begin failures++; $display("FAIL read port %0d", p); end
    end
  endtask

  initial begin
    int lab [NT];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 2; w++) begin
      @(negedge clk); multi_exec = (w == 0); init = 1;
      @(negedge clk); init = 0;
      model_init(w == 0);
      compare();
      for (int n = 0; n < 1500; n++) begin
        @(negedge clk);
        upd_valid = $urandom_range(0, 1);
        upd_reg = AR_W'($urandom_range(0, NA - 1));
        upd_orig_itid = NT'($urandom_range(0, 15));
        upd_res_itid = '0;
        for (int t = 0; t < NT; t++) begin
          lab[t] = $urandom_range(0, NT - 1);
          if (upd_orig_itid[t]) upd_res_itid[lab[t]][t] = 1'b1;
        end
        ms_valid = $urandom_range(0, 1);
        ms_reg = ($urandom_range(0, 3) == 0) ? upd_reg : AR_W'($urandom_range(0, NA - 1));
        ms_pairs = NP'($urandom);
        rd_reg[0] = AR_W'($urandom_range(0, NA - 1));
        rd_reg[1] = AR_W'($urandom_range(0, NA - 1));
        #1 compare();
        @(posedge clk);
        // reference update: merge set first, then the split update of the destination
        if (ms_valid)
          for (int a = 0; a < NT; a++)
            for (int b = a + 1; b < NT; b++)
              if (ms_pairs[pair_index(a, b, NT)]) model[ms_reg][a][b] = 1;
        if (upd_valid)
          for (int a = 0; a < NT; a++)
            for (int b = a + 1; b < NT; b++)
              if (upd_orig_itid[a] || upd_orig_itid[b])
                model[upd_reg][a][b] = upd_orig_itid[a] && upd_orig_itid[b] && lab[a] == lab[b];
      end
    end
    @(negedge clk); upd_valid = 0; ms_valid = 0; #1 compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
