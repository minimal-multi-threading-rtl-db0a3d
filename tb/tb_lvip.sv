// tb_lvip: self-checking test of the Load Values Identical Predictor.
// Every load PC is predicted identical until a misprediction for it is
// reported; a later misprediction for a different PC with the same table
// index replaces it. A reference associative array of the direct-mapped table
// decides the expected prediction for random lookups.
module tb_lvip;
  localparam int unsigned ENTRIES = 4096, PC_W = 32;
  logic clk = 0, rst_n = 0, init = 0;
  logic [PC_W-1:0] lk_pc = '0, upd_pc = '0;
  logic lk_identical, upd_valid = 0;
  int checks = 0, failures = 0;
  logic [PC_W-1:0] model [int];

  lvip #(.ENTRIES(ENTRIES), .PC_W(PC_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PC_W-1:0] rpc();
    // PCs from a small region so that index conflicts happen
    return {16'h0040, 2'b00, 12'($urandom_range(0, 4095)) & 12'h0ff, 2'b00} ^
           {14'h0, 2'($urandom_range(0, 3)), 16'h0};
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      lk_pc = rpc();
      upd_valid = ($urandom_range(0, 9) == 0);
      upd_pc = rpc();
      #1;
      begin
        int idx;
        bit exp;
        idx = int'(lk_pc[13:2]);
        exp = !(model.exists(idx) && model[idx] == lk_pc);
        checks++;
        if (lk_identical !== exp) begin
          failures++;
          $display("FAIL pc %h pred %0b expected %0b", lk_pc, lk_identical, exp);
        end
      end
      @(posedge clk);
      if (upd_valid) model[int'(upd_pc[13:2])] = upd_pc;
    end
    // init forgets everything
    @(negedge clk); upd_valid = 0; init = 1; @(negedge clk); init = 0;
    lk_pc = upd_pc; #1;
    checks++;
    if (lk_identical !== 1'b1) begin failures++; $display("FAIL init"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
