// half_adder: the HA element from which every butterfly-formed weight
// accumulator is built. It adds two bits of equal weight w and returns a carry
// of weight 2w and a sum of weight w. The critical path through it is a single
// gate (AND for the carry, XOR for the sum), which is what keeps the BWA fast
// compared with a saturating adder. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic carry,  // weight 2w
  output logic sum     // weight w
);
  assign carry = a & b;
  assign sum   = a ^ b;
endmodule
