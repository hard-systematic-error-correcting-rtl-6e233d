// tag_match_checker: test driver for one (N,K) instance of ecc_tag_match.
// On start it applies VECTORS random stimuli (correct codewords, 1..6 bit
// errors, other tags' codewords, random words) and, if EXHAUSTIVE is set,
// every (tag, retrieved word) pair. The expected outcome comes from a
// reference encoder written here (data bit j at Hamming position
// 3,5,6,7,9,..., checks = XOR of positions, top bit = overall parity) and the
// Hamming distance d: match d <= 1, fault d = 2, mismatch d > 2. It counts
// how often each outcome occurred and raises done when finished.
module tag_match_checker #(
  parameter int N = 8,
  parameter int K = 4,
  parameter int VECTORS = 1000,
  parameter bit EXHAUSTIVE = 0
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_match,
  output int   n_fault,
  output int   n_mismatch
);
  localparam int R = N - K;
  logic [N-1:0] retrieved;
  logic [K-1:0] tag;
  logic         match, mismatch, fault;
  logic [1:0]   dist_sat;

  ecc_tag_match #(.N(N), .K(K)) dut (
    .retrieved(retrieved), .tag(tag),
    .match(match), .mismatch(mismatch), .fault(fault), .dist_sat(dist_sat));

  function automatic logic [R-1:0] ref_parity(input logic [K-1:0] d);
    int syn = 0, c = 0, ones = 0;
    logic [R-1:0] p;
    for (int pos = 3; c < K; pos++)
      if ((pos & (pos - 1)) != 0) begin
        if (d[c]) begin syn ^= pos; ones++; end
        c++;
      end
    p = R'(syn);
    p[R-1] = 1'b0;
    p[R-1] = ((ones + $countones(p)) % 2) != 0;
    return p;
  endfunction

  function automatic logic [N-1:0] flips(input int e);
    logic [N-1:0] m = '0;
    while ($countones(m) < e) m[$urandom % N] = 1'b1;
    return m;
  endfunction

  task automatic apply(input logic [N-1:0] r, input logic [K-1:0] t);
    int d;
    retrieved = r;
    tag       = t;
    #1;
    d = $countones(r ^ {t, ref_parity(t)});
    checks++;
    if (match != (d <= 1) || fault != (d == 2) || mismatch != (d > 2) ||
        int'(dist_sat) != ((d > 3) ? 3 : d)) begin
      failures++;
      if (failures < 10)
        $display("FAIL (%0d,%0d) d=%0d r=%h t=%h -> m=%0b f=%0b x=%0b", N, K, d, r, t,
                 match, fault, mismatch);
    end
    n_match += match;
    n_fault += fault;
    n_mismatch += mismatch;
  endtask

  initial begin
    logic [K-1:0] t, t2;
    logic [N-1:0] cw;
    done = 0; checks = 0; failures = 0; n_match = 0; n_fault = 0; n_mismatch = 0;
    retrieved = '0; tag = '0;
    wait (start);
    for (int n = 0; n < VECTORS; n++) begin
      t  = K'({$urandom, $urandom});
      cw = {t, ref_parity(t)};
      apply(cw ^ flips(int'($urandom % 3)), t);
      apply(cw ^ flips(3 + int'($urandom % 4)), t);
      t2 = t ^ K'(1 << ($urandom % K));
      apply({t2, ref_parity(t2)} ^ flips(int'($urandom % 2)), t);
      apply(N'({$urandom, $urandom}), t);
    end
    if (EXHAUSTIVE)
      for (int ti = 0; ti < (1 << K); ti++)
        for (int ri = 0; ri < (1 << N); ri++)
          apply(N'(ri), K'(ti));
    done = 1;
  end
endmodule
