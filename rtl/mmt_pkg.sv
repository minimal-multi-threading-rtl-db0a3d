// mmt_pkg: types and helpers shared by the Minimal Multi-Threading (MMT) blocks.
//
// An MMT core is an SMT core that fetches an instruction once for every thread
// whose PC equals it, and executes it once for every group of those threads
// whose source registers hold identical values. The set of threads an
// instruction stands for is its ITID, one bit per thread. Thread pairs are
// numbered (0,1),(0,2),...,(0,NT-1),(1,2),... by pair_index(); the Register
// Sharing Table keeps one bit per pair.
//
// The fetch modes MERGE, DETECT and CATCHUP and the four instruction classes
// follow the document; the encodings are this design's choice.
package mmt_pkg;

  // Fetch mode of a pair of threads (and of a fetched instruction).
  typedef enum logic [1:0] {
    MODE_MERGE   = 2'd0,
    MODE_DETECT  = 2'd1,
    MODE_CATCHUP = 2'd2
  } fetch_mode_e;

  // Instruction classes the splitting rules distinguish.
  typedef enum logic [1:0] {
    OP_ALU    = 2'd0,
    OP_BRANCH = 2'd1,
    OP_LOAD   = 2'd2,
    OP_STORE  = 2'd3
  } op_class_e;

  // Number of thread pairs for nt threads.
  function automatic int unsigned num_pairs(int unsigned nt);
    return (nt * (nt - 1)) / 2;
  endfunction

  // Index of the pair (a,b), a != b, in the pair numbering above.
  function automatic int unsigned pair_index(int unsigned a, int unsigned b, int unsigned nt);
    int unsigned lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    return lo * nt - (lo * (lo + 1)) / 2 + (hi - lo - 1);
  endfunction

endpackage
