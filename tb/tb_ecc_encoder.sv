// tb_ecc_encoder: checks the (40,33) systematic SEC-DED encoder.
//   * Every codeword {data, parity} must be a valid extended Hamming word:
//     placing data bit j at its Hamming position (3,5,6,7,9,...) and Hamming
//     check i at position 2**i, the XOR of the positions of all ones must be
//     0 and the total number of ones must be even.
//   * Minimum distance: flipping any one or two data bits must change the
//     codeword in at least 4 places; random distinct data give distance >= 4.
module tb_ecc_encoder;
  localparam int N = 40, K = 33, R = N - K;
  logic [K-1:0] data, data2;
  logic [R-1:0] par, par2;
  int checks = 0, failures = 0;

  ecc_encoder #(.N(N), .K(K)) dut  (.data(data),  .parity(par));
  ecc_encoder #(.N(N), .K(K)) dut2 (.data(data2), .parity(par2));

  function automatic int hpos(int j);
    int c = 0;
    for (int p = 3; p < 4096; p++)
      if ((p & (p - 1)) != 0) begin
        if (c == j) return p;
        c++;
      end
    return 0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check_valid();
    int syn = 0, ones = 0;
    for (int j = 0; j < K; j++) if (data[j]) begin syn ^= hpos(j); ones++; end
    for (int i = 0; i < R - 1; i++) if (par[i]) begin syn ^= (1 << i); ones++; end
    if (par[R-1]) ones++;
    check(syn == 0 && (ones % 2) == 0, $sformatf("codeword of %h parity %b", data, par));
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = '0; data2 = '0; #1;
    check(par == '0, "zero data, zero parity");
    for (int n = 0; n < 400; n++) begin
      data = {$urandom, $urandom};
      #1;
      check_valid();
      for (int j = 0; j < K; j++) begin
        data2 = data ^ (K'(1) << j);
        #1;
        check($countones({data, par} ^ {data2, par2}) >= 4, "one data flip");
      end
      data2 = data ^ (K'(1) << ($urandom % K)) ^ (K'(1) << ($urandom % K));
      #1;
      if (data2 != data) check($countones({data, par} ^ {data2, par2}) >= 4, "two data flips");
      data2 = {$urandom, $urandom};
      #1;
      if (data2 != data) check($countones({data, par} ^ {data2, par2}) >= 4, "random pair");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
