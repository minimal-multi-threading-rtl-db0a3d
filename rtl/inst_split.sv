// inst_split: turns one fetched instruction into the minimal set of
// instructions that must execute (Filter and Chooser).
//
// Every non-empty set of threads is an entry, named by its EID (one bit per
// thread, like an ITID). An entry is 1 when all its threads share every source
// register: single-thread entries are always 1, larger entries are the AND of
// the pair-sharing bits of all the pairs inside them. The filter keeps only
// entries that are subsets of the remaining ITID; the chooser takes the kept
// entry with the most threads. That entry becomes one output ITID, its threads
// are removed, and the filter/chooser pair repeats on the rest, so an ITID of
// NT threads yields between 1 and NT ITIDs. The structure follows the
// document; breaking a tie between equally large entries in favour of the
// lowest EID is this design's choice.
//
// Interface (combinational, one instruction per cycle): itid and pair_share
// (bit p = thread pair p shares all sources, see mmt_pkg::pair_index) in;
// force_split makes every thread its own instruction. out_itid[k] is valid for
// k < out_count, outputs are ordered by decreasing size; unused slots are 0.
module inst_split
  import mmt_pkg::*;
#(
  parameter int unsigned NT = 4
) (
  input  logic [NT-1:0]                  itid,
  input  logic [num_pairs(NT)-1:0]       pair_share,
  input  logic                           force_split,
  output logic [NT-1:0][NT-1:0]          out_itid,
  output logic [NT-1:0]                  out_valid,
  output logic [$clog2(NT+1)-1:0]        out_count
);
  localparam int unsigned NE   = 1 << NT;
  localparam int unsigned CN_W = $clog2(NT + 1);

  function automatic int unsigned ones(logic [NT-1:0] v);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < NT; i++) n += int'(v[i]);
    return n;
  endfunction

  logic [NE-1:0]          ent;        // sharing value of every EID
  logic [NT:0][NT-1:0]    rem;        // threads still to place before chooser k
  logic [NT-1:0][NT-1:0]  choice;

  // entries: AND of the pair bits inside each thread set
  always_comb begin
    ent = '0;
    for (int unsigned e = 1; e < NE; e++) begin
      ent[e] = (ones(NT'(e)) == 1) || !force_split;
      for (int unsigned a = 0; a < NT; a++)
        for (int unsigned b = a + 1; b < NT; b++)
          if (e[a] && e[b] && !pair_share[pair_index(a, b, NT)]) ent[e] = 1'b0;
    end
  end

  // filter + chooser, repeated
  always_comb begin
    rem    = '0;
    choice = '0;
    rem[0] = itid;
    for (int unsigned k = 0; k < NT; k++) begin
      for (int unsigned e = 1; e < NE; e++)
        if (ent[e] && ((NT'(e) & ~rem[k]) == '0) && (ones(NT'(e)) > ones(choice[k])))
          choice[k] = NT'(e);
      rem[k+1] = rem[k] & ~choice[k];
    end
  end

  always_comb begin
    out_count = '0;
    for (int unsigned k = 0; k < NT; k++) begin
      out_itid[k]  = choice[k];
      out_valid[k] = (choice[k] != '0);
      if (choice[k] != '0) out_count = out_count + CN_W'(1);
    end
  end

endmodule
