// ecc_match_pkg: constants and elaboration-time helper functions shared by the
// butterfly-formed weight accumulator (BWA), the second-level network and the
// decision unit of the ECC tag matcher.
//
// A BWA with 2**s inputs is built from s stages of half adders. Stage t pairs
// bit i of the left half of every 2**t-wide block with bit i of the right half
// (both carry the same weight) and writes the carry to slot 2i and the sum to
// slot 2i+1 of the block. As a result, output slot p of an s-stage BWA has the
// weight 2**z, where z is the number of zero bits among the low s bits of p;
// for s = 3 the weights are 8,4,4,2,4,2,2,1. The number of ones at the input
// equals the weighted sum of the outputs. bwa_weight() gives that weight, and
// the other functions let every block agree on how the outputs of the first
// level are grouped by weight for the second level.
package ecc_match_pkg;

  // Number of half-adder stages of a BWA with w inputs (inputs padded to a power of two).
  function automatic int unsigned bwa_stages(input int unsigned w);
    return (w <= 1) ? 0 : $clog2(w);
  endfunction

  // Weight of output slot p of an s-stage BWA whose inputs have weight 1.
  function automatic int unsigned bwa_weight(input int unsigned s, input int unsigned p);
    int unsigned wt;
    wt = 1;
    for (int unsigned b = 0; b < s; b++)
      if (((p >> b) & 1) == 0) wt = wt * 2;
    return wt;
  endfunction

  // Largest power of two not above r (r >= 1): the highest weight that the
  // second level still counts; every heavier bit already means d > r.
  function automatic int unsigned pow2_floor(input int unsigned r);
    int unsigned p;
    p = 1;
    while (p * 2 <= r) p = p * 2;
    return p;
  endfunction

  // Number of first-level output slots of weight wt, summed over the tag BWA
  // (st stages) and the parity BWA (sp stages).
  function automatic int unsigned l1_count(input int unsigned st, input int unsigned sp,
                                           input int unsigned wt);
    int unsigned c;
    c = 0;
    for (int unsigned p = 0; p < (1 << st); p++) if (bwa_weight(st, p) == wt) c++;
    for (int unsigned p = 0; p < (1 << sp); p++) if (bwa_weight(sp, p) == wt) c++;
    return c;
  endfunction

  // Index, in the concatenation {tag outputs, parity outputs} (parity in the
  // low slots), of the j-th slot whose weight is wt.
  function automatic int unsigned l1_index(input int unsigned st, input int unsigned sp,
                                           input int unsigned wt, input int unsigned j);
    int unsigned c;
    c = 0;
    for (int unsigned p = 0; p < (1 << sp); p++)
      if (bwa_weight(sp, p) == wt) begin
        if (c == j) return p;
        c++;
      end
    for (int unsigned p = 0; p < (1 << st); p++)
      if (bwa_weight(st, p) == wt) begin
        if (c == j) return (1 << sp) + p;
        c++;
      end
    return 0;
  endfunction

  // Number of second-level BWAs: one per weight 1, 2, 4, ... up to pmax.
  function automatic int unsigned l2_classes(input int unsigned pmax);
    return $clog2(pmax) + 1;
  endfunction

  // Widest second-level BWA input, used to size the padded class arrays.
  function automatic int unsigned l2_max_inputs(input int unsigned st, input int unsigned sp,
                                                input int unsigned pmax);
    int unsigned m;
    m = 1;
    for (int unsigned c = 0; c < l2_classes(pmax); c++)
      if (l1_count(st, sp, 1 << c) > m) m = l1_count(st, sp, 1 << c);
    return m;
  endfunction

endpackage
