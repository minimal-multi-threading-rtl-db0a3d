// tb_fhb: self-checking test of the Fetch History Buffer.
// Writes pseudo-random PCs and compares every search port's hit against a
// reference list of the last ENTRIES written PCs (oldest replaced first),
// including searches for PCs that were just pushed out and a clear.
module tb_fhb;
  localparam int unsigned ENTRIES = 32;
  localparam int unsigned PC_W    = 32;
  localparam int unsigned NS      = 4;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, wr_en = 1'b0;
  logic [PC_W-1:0] wr_pc = '0;
  logic [NS-1:0][PC_W-1:0] search_pc = '0;
  logic [NS-1:0] hit;
  int checks = 0, failures = 0;
  logic [PC_W-1:0] hist [$];

  fhb #(.ENTRIES(ENTRIES), .PC_W(PC_W), .NSEARCH(NS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit in_hist(logic [PC_W-1:0] pc);
    foreach (hist[i]) if (hist[i] == pc) return 1'b1;
    return 1'b0;
  endfunction

  task automatic search_and_check();
    for (int s = 0; s < NS; s++) begin
      int r = $urandom_range(0, 3);
      if (r == 0 || hist.size() == 0) search_pc[s] = {$urandom_range(0, 255), 2'b00};
      else search_pc[s] = hist[$urandom_range(0, hist.size() - 1)];
    end
    #1;
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (hit[s] !== in_hist(search_pc[s])) begin
        failures++;
        $display("FAIL search %h hit=%0b expected %0b", search_pc[s], hit[s], in_hist(search_pc[s]));
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    search_and_check();                    // empty buffer: no hit
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 3) != 0);
      wr_pc = {$urandom_range(0, 255), 2'b00};
      @(posedge clk);
      if (wr_en) begin
        hist.push_back(wr_pc);
        if (hist.size() > ENTRIES) void'(hist.pop_front());
      end
      @(negedge clk);
      wr_en = 1'b0;
      search_and_check();
    end
    // an evicted entry must be gone: write ENTRIES+1 distinct PCs
    for (int n = 0; n <= ENTRIES; n++) begin
      @(negedge clk); wr_en = 1'b1; wr_pc = 32'h1000_0000 + 4 * n;
      @(posedge clk);
      hist.push_back(wr_pc); if (hist.size() > ENTRIES) void'(hist.pop_front());
    end
    @(negedge clk); wr_en = 1'b0;
    search_pc[0] = 32'h1000_0000; search_pc[1] = 32'h1000_0004;
    search_pc[2] = 32'h1000_0000 + 4 * ENTRIES; search_pc[3] = 32'h0;
    #1;
    checks += 3;
    if (hit[0] !== 1'b0) begin failures++; $display("FAIL oldest PC not evicted"); end
    if (hit[1] !== 1'b1) begin failures++; $display("FAIL second PC lost"); end
    if (hit[2] !== 1'b1) begin failures++; $display("FAIL newest PC missing"); end
    // clear
    @(negedge clk); clear = 1'b1; @(posedge clk); @(negedge clk); clear = 1'b0;
    hist.delete();
    search_pc[0] = 32'h1000_0004; #1;
    checks++;
    if (hit[0] !== 1'b0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
