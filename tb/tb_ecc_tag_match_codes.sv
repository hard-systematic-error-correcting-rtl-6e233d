// tb_ecc_tag_match_codes: runs the matcher at every code size evaluated for
// this architecture: (16,11), (24,18), (31,25) and (40,33), plus the (16,8)
// size and the small (8,4) example, which is checked exhaustively over all
// 16 x 256 (tag, retrieved word) pairs. Each size must produce matches,
// faults and mismatches and agree with the reference on every vector.
module tb_ecc_tag_match_codes;
  localparam int NC = 6;
  logic start = 0;
  logic [NC-1:0] done;
  int ck[NC], fl[NC], nm[NC], nf[NC], nx[NC];
  int checks = 0, failures = 0;

  tag_match_checker #(.N(8),  .K(4),  .VECTORS(500), .EXHAUSTIVE(1)) c84 (
    .start(start), .done(done[0]), .checks(ck[0]), .failures(fl[0]),
    .n_match(nm[0]), .n_fault(nf[0]), .n_mismatch(nx[0]));
  tag_match_checker #(.N(16), .K(8),  .VECTORS(3000)) c168 (
    .start(start), .done(done[1]), .checks(ck[1]), .failures(fl[1]),
    .n_match(nm[1]), .n_fault(nf[1]), .n_mismatch(nx[1]));
  tag_match_checker #(.N(16), .K(11), .VECTORS(3000)) c1611 (
    .start(start), .done(done[2]), .checks(ck[2]), .failures(fl[2]),
    .n_match(nm[2]), .n_fault(nf[2]), .n_mismatch(nx[2]));
  tag_match_checker #(.N(24), .K(18), .VECTORS(3000)) c2418 (
    .start(start), .done(done[3]), .checks(ck[3]), .failures(fl[3]),
    .n_match(nm[3]), .n_fault(nf[3]), .n_mismatch(nx[3]));
  tag_match_checker #(.N(31), .K(25), .VECTORS(3000)) c3125 (
    .start(start), .done(done[4]), .checks(ck[4]), .failures(fl[4]),
    .n_match(nm[4]), .n_fault(nf[4]), .n_mismatch(nx[4]));
  tag_match_checker #(.N(40), .K(33), .VECTORS(3000)) c4033 (
    .start(start), .done(done[5]), .checks(ck[5]), .failures(fl[5]),
    .n_match(nm[5]), .n_fault(nf[5]), .n_mismatch(nx[5]));

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1 start = 1;
    wait (&done);
    for (int i = 0; i < NC; i++) begin
      $display("code %0d: checks=%0d failures=%0d match=%0d fault=%0d mismatch=%0d",
               i, ck[i], fl[i], nm[i], nf[i], nx[i]);
      checks   += ck[i] + 1;
      failures += fl[i];
      if (nm[i] == 0 || nf[i] == 0 || nx[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
