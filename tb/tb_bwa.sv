// tb_bwa: checks the butterfly-formed weight accumulator.
//   * 8-input full butterfly: the output weights must be 8,4,4,2,4,2,2,1
//     (slots I..P); a single one lands in P, eight ones in I only; for all
//     256 inputs the weighted output sum equals the number of ones.
//   * 33-input full butterfly (padded to 64): random inputs, weighted sum.
//   * 8-input reduced butterfly (KEEP_MAX = 1): sat must be 0 with the exact
//     count below 2 and never 0 with a wrong weighted sum; sat = 1 only
//     when at least two inputs are set.
//   * 4-input BWA with BASE_W = 2, KEEP_MAX = 2 (a second-level "BWA for
//     2's"): exhaustive, in units of the global weight; sat means a
//     global count of at least 4.
// Weights are recomputed here from the slot index (2 to the number of zero
// bits in the index).
module tb_bwa;
  int checks = 0, failures = 0;

  function automatic int wt(int s, int p);
    int w = 1;
    for (int b = 0; b < s; b++) if (((p >> b) & 1) == 0) w *= 2;
    return w;
  endfunction

  logic [7:0]  in8,  out8;
  logic        sat8;
  logic [32:0] in33;
  logic [63:0] out33;
  logic        sat33;
  logic [7:0]  in8r, out8r;
  logic        sat8r;
  logic [3:0]  in4,  out4;
  logic        sat4;

  bwa #(.W(8))                              u8   (.in(in8),  .out(out8),  .sat(sat8));
  bwa #(.W(33))                             u33  (.in(in33), .out(out33), .sat(sat33));
  bwa #(.W(8), .KEEP_MAX(1))                u8r  (.in(in8r), .out(out8r), .sat(sat8r));
  bwa #(.W(4), .BASE_W(2), .KEEP_MAX(2))    u4   (.in(in4),  .out(out4),  .sat(sat4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_w[8] = '{8, 4, 4, 2, 4, 2, 2, 1};
    for (int p = 0; p < 8; p++) check(wt(3, p) == exp_w[p], "weight table I..P");

    in33 = '0; in8r = '0; in4 = '0;
    in8 = 8'h01; #1; check(out8 == 8'h80 && !sat8, "single one -> P");
    in8 = 8'hff; #1; check(out8 == 8'h01 && !sat8, "eight ones -> I");

    for (int v = 0; v < 256; v++) begin
      int s;
      in8 = 8'(v); in8r = 8'(v); #1;
      s = 0;
      for (int p = 0; p < 8; p++) s += out8[p] ? wt(3, p) : 0;
      check(s == $countones(in8) && !sat8, $sformatf("w8 v=%0d", v));
      s = 0;
      for (int p = 0; p < 8; p++) s += out8r[p] ? wt(3, p) : 0;
      if (sat8r) check($countones(in8r) >= 2, $sformatf("w8r sat v=%0d", v));
      else       check(s == $countones(in8r), $sformatf("w8r sum v=%0d", v));
      if ($countones(in8r) < 2) check(!sat8r, $sformatf("w8r nosat v=%0d", v));
    end

    for (int n = 0; n < 3000; n++) begin
      int s;
      in33 = {$urandom, $urandom};
      if (n % 4 == 0) in33 &= {$urandom, $urandom};
      if (n % 8 == 0) in33 &= {$urandom, $urandom} & {$urandom, $urandom};
      #1;
      s = 0;
      for (int p = 0; p < 64; p++) s += out33[p] ? wt(6, p) : 0;
      check(s == $countones(in33) && !sat33, $sformatf("w33 %h", in33));
    end

    for (int v = 0; v < 16; v++) begin
      int s;
      in4 = 4'(v); #1;
      s = 0;
      for (int p = 0; p < 4; p++) s += out4[p] ? 2 * wt(2, p) : 0;
      if (sat4) check(2 * $countones(in4) >= 4, $sformatf("w4 sat v=%0d", v));
      else      check(s == 2 * $countones(in4), $sformatf("w4 sum v=%0d", v));
      if ($countones(in4) < 2) check(!sat4, $sformatf("w4 nosat v=%0d", v));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
