// tb_decision_unit: decision unit for (40,33) with T_MAX = 1, R_MAX = 2.
// Second-level bits are driven with sparse random patterns (padding slots 0)
// plus random OR-tree and pruning flags. The expected distance is the
// weighted sum of the bits, with weights recomputed here: class 0 (2 bits)
// has slot weights 2,1; class 1 (9 bits, 16 slots) has 2 * 2**(zero bits of
// the 4-bit slot index). Any flag means d > R_MAX. Checked: the one-hot
// outcome (match d<=1, fault d=2, mismatch d>2) and dist_sat = min(d, 3).
module tb_decision_unit;
  localparam int M2 = 16;
  logic            or_flag;
  logic [2*M2-1:0] l2_bits;
  logic [1:0]      l2_sat;
  logic            match, mismatch, fault;
  logic [1:0]      dist_sat;
  int checks = 0, failures = 0;
  int n_match = 0, n_fault = 0, n_mis = 0;

  decision_unit #(.KT(33), .KP(7), .T_MAX(1), .R_MAX(2)) dut (
    .or_flag(or_flag), .l2_bits(l2_bits), .l2_sat(l2_sat),
    .match(match), .mismatch(mismatch), .fault(fault), .dist_sat(dist_sat));

  function automatic int wt(int s, int p);
    int w = 1;
    for (int b = 0; b < s; b++) if (((p >> b) & 1) == 0) w *= 2;
    return w;
  endfunction

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
    for (int n = 0; n < 20000; n++) begin
      int d, exp_d;
      bit over;
      l2_bits = '0;
      for (int k = 0; k < int'($urandom % 3); k++) begin
        if ($urandom % 2) l2_bits[$urandom % 2] = 1'b1;
        else              l2_bits[M2 + ($urandom % 9)] = 1'b1;
      end
      or_flag = ($urandom % 10) == 0;
      l2_sat  = 2'(($urandom % 10) == 0 ? $urandom : 0);
      #1;
      d = (l2_bits[0] ? 2 : 0) + (l2_bits[1] ? 1 : 0);
      for (int p = 0; p < M2; p++) if (l2_bits[M2 + p]) d += 2 * wt(4, p);
      over  = or_flag || (l2_sat != 0) || d > 2;
      exp_d = over ? 3 : d;
      check($onehot({match, mismatch, fault}), "one-hot outcome");
      check(match    == (!over && d <= 1), $sformatf("match d=%0d over=%0d", d, over));
      check(fault    == (!over && d == 2), $sformatf("fault d=%0d over=%0d", d, over));
      check(mismatch == over,              $sformatf("mismatch d=%0d over=%0d", d, over));
      check(int'(dist_sat) == exp_d,       $sformatf("dist_sat %0d vs %0d", dist_sat, exp_d));
      n_match += match; n_fault += fault; n_mis += mismatch;
    end
    check(n_match > 0 && n_fault > 0 && n_mis > 0, "all outcomes seen");
    $display("match=%0d fault=%0d mismatch=%0d", n_match, n_fault, n_mis);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
