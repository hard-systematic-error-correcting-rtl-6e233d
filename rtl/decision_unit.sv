// decision_unit: classifies the Hamming distance d between the encoded
// incoming tag and the retrieved codeword from the second-level outputs.
//   d <= T_MAX          -> match    (equal, or equal once <= T_MAX bit errors
//                                    in the stored word are corrected)
//   T_MAX < d <= R_MAX  -> fault    (detectable but uncorrectable error)
//   d >  R_MAX          -> mismatch
// d is known to exceed R_MAX when the OR-gate tree fired, a second-level
// pruning flag is set or any second-level bit heavier than R_MAX is set.
// Otherwise the few remaining light bits (weights <= R_MAX) are added in a
// small adder. dist_sat reports min(d, R_MAX+1).
//
// The three outcomes are the document's; the thresholds T_MAX = 1 and
// R_MAX = 2 (a SEC-DED code) are this design's reading, since the document
// does not state them. Exactly one of match/mismatch/fault is 1. Purely
// combinational.
module decision_unit
  import ecc_match_pkg::*;
#(
  parameter int unsigned KT    = 33,
  parameter int unsigned KP    = 7,
  parameter int unsigned T_MAX = 1,
  parameter int unsigned R_MAX = 2,
  // derived, do not override
  localparam int unsigned P_MAX = pow2_floor(R_MAX),
  localparam int unsigned ST    = bwa_stages(KT),
  localparam int unsigned SP    = bwa_stages(KP),
  localparam int unsigned C     = l2_classes(P_MAX),
  localparam int unsigned M2    = 1 << bwa_stages(l2_max_inputs(ST, SP, P_MAX)),
  localparam int unsigned DW    = $clog2(R_MAX + 2)
) (
  input  logic            or_flag,
  input  logic [C*M2-1:0] l2_bits,
  input  logic [C-1:0]    l2_sat,
  output logic            match,
  output logic            mismatch,
  output logic            fault,
  output logic [DW-1:0]   dist_sat
);
  localparam int unsigned NB  = C * M2;
  localparam int unsigned SW  = $clog2(NB * R_MAX + 1) + 1;

  // Weight of second-level bit b (0 for a padding slot).
  function automatic int unsigned l2_weight(input int unsigned b);
    int unsigned c, p, mc, s;
    c  = b / M2;
    p  = b % M2;
    mc = l1_count(ST, SP, 1 << c);
    s  = bwa_stages(mc);
    if (mc == 0 || p >= (1 << s)) return 0;
    return (1 << c) * bwa_weight(s, p);
  endfunction

  logic [NB-1:0] heavy;
  logic [SW-1:0] light [NB];
  logic [SW-1:0] dsum;
  logic          over;

  for (genvar b = 0; b < NB; b++) begin : g_bit
    localparam int unsigned WB = l2_weight(b);
    if (WB > R_MAX) begin : g_heavy
      assign heavy[b] = l2_bits[b];
      assign light[b] = '0;
    end else begin : g_light
      assign heavy[b] = 1'b0;
      assign light[b] = l2_bits[b] ? SW'(WB) : '0;
    end
  end

  always_comb begin
    dsum = '0;
    for (int b = 0; b < NB; b++) dsum += light[b];
  end

  assign over = or_flag | (|l2_sat) | (|heavy) | (dsum > SW'(R_MAX));

  always_comb begin
    match    = 1'b0;
    fault    = 1'b0;
    mismatch = 1'b0;
    if (over)                     mismatch = 1'b1;
    else if (dsum > SW'(T_MAX))   fault    = 1'b1;
    else                          match    = 1'b1;
    dist_sat = over ? DW'(R_MAX + 1) : DW'(dsum);
  end

  if (T_MAX > R_MAX || R_MAX < 1) begin : g_bad_thresholds
    $error("decision_unit: need 1 <= R_MAX and T_MAX <= R_MAX");
  end
endmodule
