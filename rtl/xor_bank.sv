// xor_bank: a row of W two-input XOR gates. Each output bit is 1 where the two
// operands differ, so the number of ones at the output is the Hamming distance
// between them. The matcher uses one bank on the data (tag) part of the
// codeword, which needs no encoding and so starts at once, and one on the
// parity part, which waits for the encoder. Purely combinational.
module xor_bank #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff
);
  assign diff = a ^ b;
endmodule
