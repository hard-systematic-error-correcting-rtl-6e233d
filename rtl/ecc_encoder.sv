// ecc_encoder: systematic encoder of a single-error-correcting,
// double-error-detecting (SEC-DED) code. It returns only the N-K parity bits
// of the K-bit incoming tag; the data part of the codeword is the tag itself,
// so the codeword is {tag, parity}, data in the upper K bits.
//
// The code is a shortened extended Hamming code. Data bit j is given the j-th
// integer >= 3 that is not a power of two as its Hamming position pos(j).
// Parity bit i (0 <= i < N-K-1) is the XOR of the data bits whose pos has
// bit i set; the top parity bit is the overall parity of data and Hamming
// checks, which reduces to the XOR of the data bits whose pos has an even
// number of ones. Minimum distance is 4 whenever K + N-K-1 <= 2**(N-K-1) - 1,
// which holds for (8,4), (16,8), (16,11), (24,18), (31,25) and (40,33).
// The document gives the code lengths but not the parity-check matrix, so the
// choice of code is this design's. The masks are computed at elaboration;
// the circuit is N-K XOR trees, purely combinational.
module ecc_encoder #(
  parameter int unsigned N = 40,
  parameter int unsigned K = 33
) (
  input  logic [K-1:0]   data,
  output logic [N-K-1:0] parity
);
  localparam int unsigned R  = N - K;  // parity bits
  localparam int unsigned HC = R - 1;  // Hamming checks below the overall parity

  // Hamming position of data bit j.
  function automatic int unsigned data_pos(input int unsigned j);
    int unsigned c;
    c = 0;
    for (int unsigned p = 3; p < 4096; p++)
      if ((p & (p - 1)) != 0) begin
        if (c == j) return p;
        c++;
      end
    return 0;
  endfunction

  // Data bits that feed parity bit i.
  function automatic logic [K-1:0] parity_mask(input int unsigned i);
    logic [K-1:0] m;
    for (int unsigned j = 0; j < K; j++) begin
      if (i < HC) m[j] = ((data_pos(j) >> i) & 1) != 0;
      else        m[j] = ($countones(data_pos(j)) % 2) == 0;
    end
    return m;
  endfunction

  if (R < 2 || K + HC > (1 << HC) - 1) begin : g_bad_size
    $error("ecc_encoder: (N,K) too short for a SEC-DED extended Hamming code");
  end

  for (genvar i = 0; i < R; i++) begin : g_par
    localparam logic [K-1:0] MASK = parity_mask(i);
    assign parity[i] = ^(data & MASK);
  end
endmodule
