// tb_inst_split: self-checking test of the instruction splitter.
// (1) Sharing that is an equivalence (threads labelled by value class): the
//     outputs must be exactly the classes present in the ITID, largest first.
// (2) Arbitrary pair bits: outputs partition the ITID, every output's threads
//     share pairwise, and each output is as large as any sharing subset of
//     the threads left at that step (checked by enumeration).
// (3) force_split gives one instruction per thread.
module tb_inst_split;
  import mmt_pkg::*;
  localparam int unsigned NT = 4;
  localparam int unsigned NP = num_pairs(NT);

  logic [NT-1:0] itid;
  logic [NP-1:0] pair_share;
  logic force_split;
  logic [NT-1:0][NT-1:0] out_itid;
  logic [NT-1:0] out_valid;
  logic [$clog2(NT+1)-1:0] out_count;
  int checks = 0, failures = 0;

  inst_split #(.NT(NT)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones(logic [NT-1:0] v);
    int n = 0;
    for (int i = 0; i < NT; i++) n += v[i];
    return n;
  endfunction

  function automatic bit clique(logic [NT-1:0] s, logic [NP-1:0] sh);
    for (int a = 0; a < NT; a++)
      for (int b = a + 1; b < NT; b++)
        if (s[a] && s[b] && !sh[pair_index(a, b, NT)]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic expect_eq(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s itid=%b share=%b force=%0b out=%p count=%0d", msg, itid, pair_share,
               force_split, out_itid, out_count);
    end
  endtask

  initial begin
    // paper example: ITID 0110 with the two threads sharing stays merged
    itid = 4'b0110; force_split = 0;
    pair_share = '0; pair_share[pair_index(1, 2, NT)] = 1'b1;
    #1 expect_eq(out_count == 1 && out_itid[0] == 4'b0110, "0110 shared stays merged");
    pair_share = '0;
    #1 expect_eq(out_count == 2 && (out_itid[0] | out_itid[1]) == 4'b0110, "0110 splits in two");
    // all threads different: four instructions
    itid = 4'b1111; pair_share = '0;
    #1 expect_eq(out_count == 4, "1111 splits in four");
    pair_share = '1;
    #1 expect_eq(out_count == 1 && out_itid[0] == 4'b1111, "1111 all shared");

    // (1) equivalence classes
    for (int n = 0; n < 2000; n++) begin
      int lab [NT];
      logic [NT-1:0] cls [4];
      int ncls, sizes[$];
      for (int t = 0; t < NT; t++) lab[t] = $urandom_range(0, 3);
      itid = NT'($urandom_range(1, (1 << NT) - 1));
      force_split = 1'b0;
      for (int a = 0; a < NT; a++)
        for (int b = a + 1; b < NT; b++) pair_share[pair_index(a, b, NT)] = (lab[a] == lab[b]);
      for (int c = 0; c < 4; c++) begin
        cls[c] = '0;
        for (int t = 0; t < NT; t++) if (itid[t] && lab[t] == c) cls[c][t] = 1'b1;
      end
      ncls = 0;
      for (int c = 0; c < 4; c++) if (cls[c] != 0) ncls++;
      #1;
      expect_eq(out_count == ncls, "class count");
      for (int k = 0; k < NT; k++)
        if (k < ncls) begin
          bit is_cls;
          is_cls = 0;
          for (int c = 0; c < 4; c++) if (cls[c] == out_itid[k]) is_cls = 1;
          expect_eq(is_cls, "output is a class");
          if (k > 0) expect_eq(ones(out_itid[k]) <= ones(out_itid[k-1]), "largest first");
        end else expect_eq(out_itid[k] == 0 && !out_valid[k], "unused slot empty");
    end

    // (2) arbitrary pair bits
    for (int n = 0; n < 2000; n++) begin
      logic [NT-1:0] rem, uni;
      itid = NT'($urandom_range(0, (1 << NT) - 1));
      pair_share = NP'($urandom);
      force_split = ($urandom_range(0, 7) == 0);
      #1;
      rem = itid; uni = '0;
      for (int k = 0; k < NT; k++) begin
        int best;
        best = 0;
        for (int e = 1; e < (1 << NT); e++)
          if ((NT'(e) & ~rem) == 0 && (force_split ? ones(NT'(e)) == 1 : clique(NT'(e), pair_share)))
            if (ones(NT'(e)) > best) best = ones(NT'(e));
        expect_eq(ones(out_itid[k]) == best, "greedy size");
        expect_eq((out_itid[k] & ~rem) == 0, "output inside remaining threads");
        expect_eq(force_split ? ones(out_itid[k]) <= 1 : clique(out_itid[k], pair_share),
                  "output threads share");
        rem = rem & ~out_itid[k];
        uni = uni | out_itid[k];
      end
      expect_eq(uni == itid, "outputs cover ITID");
      expect_eq(out_count == ones(itid) - 0 || !force_split, "force_split count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
