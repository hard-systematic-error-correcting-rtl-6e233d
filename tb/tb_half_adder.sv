// tb_half_adder: exhaustive check of the half adder: carry + sum, read as a
// two-bit number, must equal a + b for all four input pairs.
module tb_half_adder;
  logic a, b, carry, sum;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .carry(carry), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (2 * int'(carry) + int'(sum) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b carry=%0b sum=%0b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
