// fhb: Fetch History Buffer of one thread.
//
// While its thread fetches apart from another thread (DETECT or CATCHUP mode),
// every taken-branch target PC of the thread is written into this buffer. The
// buffer is a content-addressable memory: another thread's branch target is
// compared with every valid entry at once and the compare results are ORed
// into a hit, the trigger for CATCHUP mode. The compare-and-OR structure and
// the 32 x 32-bit size follow the document; replacement of the oldest entry
// (a circular write pointer) and the number of search ports are this design's
// choice.
//
// Interface: wr_en/wr_pc record one PC per cycle. Each of the NSEARCH search
// ports compares search_pc[i] combinationally and returns hit[i] in the same
// cycle; a PC written in a cycle is visible to searches from the next cycle.
// clear invalidates all entries.
module fhb #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned PC_W    = 32,
  parameter int unsigned NSEARCH = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         wr_en,
  input  logic [PC_W-1:0]              wr_pc,
  input  logic [NSEARCH-1:0][PC_W-1:0] search_pc,
  output logic [NSEARCH-1:0]           hit
);
  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0][PC_W-1:0] pc_q;
  logic [ENTRIES-1:0]           valid_q;
  logic [IDX_W-1:0]             wptr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      wptr_q  <= '0;
      pc_q    <= '0;
    end else if (clear) begin
      valid_q <= '0;
      wptr_q  <= '0;
    end else if (wr_en) begin
      pc_q[wptr_q]    <= wr_pc;
      valid_q[wptr_q] <= 1'b1;
      wptr_q          <= (wptr_q == IDX_W'(ENTRIES - 1)) ? '0 : wptr_q + 1'b1;
    end
  end

  // One comparator per entry and search port, ORed per port.
  always_comb begin
    for (int unsigned s = 0; s < NSEARCH; s++) begin
      hit[s] = 1'b0;
      for (int unsigned e = 0; e < ENTRIES; e++)
        if (valid_q[e] && (pc_q[e] == search_pc[s])) hit[s] = 1'b1;
    end
  end

endmodule
