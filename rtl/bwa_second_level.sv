// bwa_second_level: the second level of the matcher. It takes the weighted
// output bits of the two first-level BWAs (one on the tag differences, one on
// the parity differences) and
//   * interconnection: regroups them by weight;
//   * OR-gate tree: ORs every bit heavier than P_MAX, together with the
//     pruning flags of the first level, into or_flag, since any such bit
//     alone already puts the distance above the detectable range;
//   * BWA for 1's, 2's, ... P_MAX's: one BWA per weight 2**c <= P_MAX counts
//     the bits of that weight (its inputs carry weight 2**c), pruned so that
//     half adders on inputs heavier than P_MAX become an OR into l2_sat[c].
// Output bit p of class c is l2_bits[c*M2 + p] and weighs
// 2**c * bwa_weight(stages of class c, p); unused slots are 0.
//
// The grouping, OR tree and per-weight BWAs follow the document's two-level
// organisation; the order in which bits of one weight are fed to their BWA
// (parity bits first) and the generic pruning rule are this design's.
// Purely combinational.
module bwa_second_level
  import ecc_match_pkg::*;
#(
  parameter int unsigned KT    = 33,  // tag bits (first-level tag BWA inputs)
  parameter int unsigned KP    = 7,   // parity bits (first-level parity BWA inputs)
  parameter int unsigned P_MAX = 2,   // heaviest weight still counted
  // derived, do not override
  localparam int unsigned ST = bwa_stages(KT),
  localparam int unsigned SP = bwa_stages(KP),
  localparam int unsigned C  = l2_classes(P_MAX),
  localparam int unsigned M2 = 1 << bwa_stages(l2_max_inputs(ST, SP, P_MAX))
) (
  input  logic [(1<<ST)-1:0] tag_cnt,
  input  logic               tag_sat,
  input  logic [(1<<SP)-1:0] par_cnt,
  input  logic               par_sat,
  output logic               or_flag,
  output logic [C*M2-1:0]    l2_bits,
  output logic [C-1:0]       l2_sat
);
  localparam int unsigned NA = (1 << ST) + (1 << SP);

  // Interconnection input: parity slots low, tag slots high.
  logic [NA-1:0] all_bits;
  assign all_bits = {tag_cnt, par_cnt};

  function automatic logic [NA-1:0] heavy_mask();
    logic [NA-1:0] m;
    for (int unsigned p = 0; p < NA; p++)
      m[p] = (p < (1 << SP)) ? (bwa_weight(SP, p) > P_MAX)
                             : (bwa_weight(ST, p - (1 << SP)) > P_MAX);
    return m;
  endfunction
  localparam logic [NA-1:0] HEAVY = heavy_mask();

  // OR-gate tree.
  assign or_flag = |(all_bits & HEAVY) | tag_sat | par_sat;

  // One BWA per weight class.
  for (genvar c = 0; c < C; c++) begin : g_class
    localparam int unsigned MC = l1_count(ST, SP, 1 << c);
    if (MC == 0) begin : g_empty
      assign l2_bits[c*M2 +: M2] = '0;
      assign l2_sat[c]           = 1'b0;
    end else begin : g_bwa
      localparam int unsigned NC = 1 << bwa_stages(MC);
      logic [MC-1:0] grp;
      logic [NC-1:0] cnt;
      for (genvar j = 0; j < MC; j++) begin : g_route
        assign grp[j] = all_bits[l1_index(ST, SP, 1 << c, j)];
      end
      bwa #(.W(MC), .BASE_W(1 << c), .KEEP_MAX(P_MAX)) u_bwa (
        .in (grp),
        .out(cnt),
        .sat(l2_sat[c])
      );
      assign l2_bits[c*M2 +: M2] = M2'(cnt);
    end
  end
endmodule
