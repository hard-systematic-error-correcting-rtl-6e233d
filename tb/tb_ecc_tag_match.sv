// tb_ecc_tag_match: end-to-end test of the matcher at its default (40,33)
// size, T_MAX = 1, R_MAX = 2.
// A reference encoder written here places data bit j at Hamming position
// 3,5,6,7,9,... and takes the Hamming checks as the XOR of those positions
// and the top bit as overall parity. Stored codewords are built from it and
// then corrupted in chosen ways: no error, 1 or 2 bit errors in the data part,
// the parity part or both, 3 to 6 errors, a codeword of a different tag with
// and without errors, and random words. The expected outcome follows from
// the Hamming distance d to the codeword of the incoming tag: match for
// d <= 1, fault for d = 2, mismatch above; dist_sat = min(d, 3). The outputs
// are combinational and are checked in the same cycle the inputs change
// (zero-cycle latency).
// Each mechanism of the datapath is counted and must occur at least once:
// exact match, match after one corrected data-part or parity-part error,
// fault, and mismatch decided by the OR-gate tree, by a first-level pruning
// flag, by a second-level pruning flag and by the small adder of the
// decision unit.
module tb_ecc_tag_match;
  localparam int N = 40, K = 33, R = N - K;

  logic         clk = 0;
  logic [N-1:0] retrieved;
  logic [K-1:0] tag;
  logic         match, mismatch, fault;
  logic [1:0]   dist_sat;
  int checks = 0, failures = 0, cycles = 0;

  int n_exact = 0, n_corr_tag = 0, n_corr_par = 0, n_fault = 0;
  int n_mis_or = 0, n_mis_l1sat = 0, n_mis_l2sat = 0, n_mis_sum = 0;

  ecc_tag_match dut (
    .retrieved(retrieved), .tag(tag),
    .match(match), .mismatch(mismatch), .fault(fault), .dist_sat(dist_sat));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired after %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  function automatic logic [N-1:0] flips_in(input int e, input int lo, input int hi);
    logic [N-1:0] m = '0;
    while ($countones(m) < e) m[lo + ($urandom % (hi - lo + 1))] = 1'b1;
    return m;
  endfunction

  task automatic apply(input logic [N-1:0] r, input logic [K-1:0] t);
    int d;
    bit exp_m, exp_f, exp_x;
    @(negedge clk);
    retrieved = r;
    tag       = t;
    #1;  // combinational: settled well inside the same cycle
    d     = $countones(r ^ {t, ref_parity(t)});
    exp_m = d <= 1;
    exp_f = d == 2;
    exp_x = d > 2;
    checks++;
    if (match != exp_m || fault != exp_f || mismatch != exp_x ||
        int'(dist_sat) != ((d > 3) ? 3 : d)) begin
      failures++;
      $display("FAIL d=%0d r=%h t=%h -> m=%0b f=%0b x=%0b dist=%0d",
               d, r, t, match, fault, mismatch, dist_sat);
    end
    if (match && d == 0) n_exact++;
    if (match && d == 1 && (r[N-1:R] != t)) n_corr_tag++;
    if (match && d == 1 && (r[N-1:R] == t)) n_corr_par++;
    if (fault) n_fault++;
    if (mismatch) begin
      if (dut.tag_sat || dut.par_sat)                                     n_mis_l1sat++;
      if (dut.or_flag)                                                    n_mis_or++;
      if (!dut.or_flag && dut.l2_sat != '0)                               n_mis_l2sat++;
      if (!dut.or_flag && dut.l2_sat == '0 && int'(dut.u_dec.dsum) > 2)   n_mis_sum++;
    end
  endtask

  initial begin
    logic [K-1:0] t, t2;
    logic [N-1:0] cw;
    retrieved = '0;
    tag = '0;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      t  = {$urandom, $urandom};
      cw = {t, ref_parity(t)};
      apply(cw, t);                                   // exact
      apply(cw ^ flips_in(1, R, N - 1), t);           // one data-part error
      apply(cw ^ flips_in(1, 0, R - 1), t);           // one parity-part error
      apply(cw ^ flips_in(2, R, N - 1), t);           // two data-part errors
      apply(cw ^ flips_in(2, 0, R - 1), t);           // two parity-part errors
      apply(cw ^ flips_in(1, R, N - 1) ^ (N'(1) << ($urandom % R)), t);  // mixed
      apply(cw ^ flips(3 + int'($urandom % 4)), t);   // 3..6 errors
      t2 = t ^ (K'(1) << ($urandom % K));
      apply({t2, ref_parity(t2)}, t);                 // neighbouring tag
      apply({t2, ref_parity(t2)} ^ flips(1), t);
      t2 = {$urandom, $urandom};
      apply({t2, ref_parity(t2)} ^ flips(int'($urandom % 3)), t);
      apply({$urandom, $urandom}, t);                 // random word
    end
    $display("exact=%0d corr_tag=%0d corr_par=%0d fault=%0d", n_exact, n_corr_tag, n_corr_par, n_fault);
    $display("mismatch: or_tree=%0d l1_prune=%0d l2_prune=%0d small_adder=%0d",
             n_mis_or, n_mis_l1sat, n_mis_l2sat, n_mis_sum);
    checks++; if (n_exact     == 0) begin failures++; $display("FAIL no exact match"); end
    checks++; if (n_corr_tag  == 0) begin failures++; $display("FAIL no corrected data error"); end
    checks++; if (n_corr_par  == 0) begin failures++; $display("FAIL no corrected parity error"); end
    checks++; if (n_fault     == 0) begin failures++; $display("FAIL no fault"); end
    checks++; if (n_mis_or    == 0) begin failures++; $display("FAIL OR tree never decided"); end
    checks++; if (n_mis_l1sat == 0) begin failures++; $display("FAIL first-level pruning never fired"); end
    checks++; if (n_mis_l2sat == 0) begin failures++; $display("FAIL second-level pruning never decided"); end
    checks++; if (n_mis_sum   == 0) begin failures++; $display("FAIL small adder never decided"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
