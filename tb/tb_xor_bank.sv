// tb_xor_bank: random operands on a 33-bit bank; every output bit must be 1
// exactly where the two operand bits differ, and the number of ones must be
// the Hamming distance counted bit by bit.
module tb_xor_bank;
  localparam int W = 33;
  logic [W-1:0] a, b, diff;
  int checks = 0, failures = 0;

  xor_bank #(.W(W)) dut (.a(a), .b(b), .diff(diff));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int hd;
      a = {$urandom, $urandom};
      b = (n % 3 == 0) ? a : {$urandom, $urandom};
      if (n % 5 == 1) b = a ^ (W'(1) << ($urandom % W));
      #1;
      hd = 0;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (diff[i] != (a[i] != b[i])) failures++;
        if (a[i] != b[i]) hd++;
      end
      checks++;
      if ($countones(diff) != hd) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
