// preg_state: owner threads of every physical register, and allocation.
//
// With shared execution one physical register can hold an architected
// register of several threads at once. Each physical register therefore keeps
// one owner bit per thread (the document sizes this state as 256 x 4 bits and
// calls it the thread owners); a register is free when it has no owner.
// Rename asks for up to NT registers per cycle (alloc_req); they are the
// lowest-numbered free registers and alloc_ok says all requests can be met.
// A granted register (alloc_fire) gets the ITID of its instruction as owners.
// When an instruction commits, each of its threads gives up the register that
// held the architected destination before it (rel_old[t]); the document gives
// only the size of this state, so this allocate/release discipline is this
// design's choice.
//
// Start state (init): architected register r of every thread in physical
// register r; for a multi-threaded workload the stack pointer of thread t is
// in physical register NUM_AREGS + t instead.
module preg_state
  import mmt_pkg::*;
#(
  parameter int unsigned NT        = 4,
  parameter int unsigned NUM_AREGS = 50,
  parameter int unsigned NUM_PREGS = 256,
  parameter int unsigned SP_REG    = 29,
  localparam int unsigned PR_W     = $clog2(NUM_PREGS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   init,
  input  logic                   multi_exec,
  input  logic [NT-1:0]          thread_active,
  // allocation
  input  logic [NT-1:0]          alloc_req,
  output logic [NT-1:0][PR_W-1:0] alloc_preg,
  output logic                   alloc_ok,
  input  logic [NT-1:0]          alloc_fire,
  input  logic [NT-1:0][NT-1:0]  alloc_owner,
  // release at commit
  input  logic                   rel_valid,
  input  logic [NT-1:0]          rel_itid,
  input  logic [NT-1:0][PR_W-1:0] rel_old,
  output logic [PR_W:0]          free_count
);
  logic [NUM_PREGS-1:0][NT-1:0] own_q;
  logic [NUM_PREGS-1:0]         is_free;
  logic [NT-1:0]                found;

  always_comb begin
    free_count = '0;
    for (int unsigned p = 0; p < NUM_PREGS; p++) begin
      is_free[p] = (own_q[p] == '0);
      if (is_free[p]) free_count = free_count + 1'b1;
    end
  end

  // hand out the lowest free registers, one per requesting slot; a register
  // given to slot k is no longer available to the later slots
  always_comb begin
    logic [NUM_PREGS-1:0] avail;
    avail      = is_free;
    found      = '0;
    alloc_preg = '0;
    for (int unsigned k = 0; k < NT; k++)
      if (alloc_req[k]) begin
        for (int p = NUM_PREGS - 1; p >= 0; p--)
          if (avail[p]) begin
            alloc_preg[k] = PR_W'(p);
            found[k]      = 1'b1;
          end
        if (found[k]) avail[alloc_preg[k]] = 1'b0;
      end
    alloc_ok = ((found & alloc_req) == alloc_req);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_q <= '0;
    end else if (init) begin
      for (int unsigned p = 0; p < NUM_PREGS; p++) begin
        own_q[p] <= '0;
        if (p < NUM_AREGS) own_q[p] <= thread_active;
      end
      if (!multi_exec) begin
        own_q[SP_REG] <= '0;
        for (int unsigned t = 0; t < NT; t++)
          own_q[NUM_AREGS + t] <= thread_active & NT'(1 << t);
      end
    end else begin
      if (rel_valid)
        for (int unsigned t = 0; t < NT; t++)
          if (rel_itid[t]) own_q[rel_old[t]][t] <= 1'b0;
      for (int unsigned k = 0; k < NT; k++)
        if (alloc_fire[k]) own_q[alloc_preg[k]] <= alloc_owner[k];
    end
  end

endmodule
