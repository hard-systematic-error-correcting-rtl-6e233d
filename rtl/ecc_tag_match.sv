// ecc_tag_match: low-latency matcher for tags stored as systematic ECC
// codewords (for example cache tags or TLB entries protected by SEC-DED).
//
// Instead of decoding and correcting the retrieved codeword before comparing
// it, the incoming K-bit tag is encoded and the Hamming distance d between the
// two N-bit codewords is classified. Because the codeword is systematic
// ({data, parity}, data in the upper K bits), the data part is compared with
// the raw incoming tag at once, in parallel with the encoder; only the N-K
// parity bits wait for encoding. Datapath:
//
//   retrieved[N-1:N-K]  ^ tag            -> BWA for tags     \
//   retrieved[N-K-1:0]  ^ encoder(tag)   -> BWA for parities -> second level
//        (interconnection, OR-gate tree, BWA per weight) -> decision unit
//
// Outputs: match (d <= T_MAX), fault (T_MAX < d <= R_MAX), mismatch
// (d > R_MAX); exactly one is 1. dist_sat is min(d, R_MAX+1).
// The whole block is combinational: its latency is that of the encoder in
// parallel with the tag XOR, then the parity XOR, the half-adder stages and
// the decision logic; there is no clock. Register the ports outside if a
// pipeline stage is wanted.
//
// The (40,33) default size and the architecture follow the document. The
// SEC-DED code (shortened extended Hamming), T_MAX = 1 and R_MAX = 2 are this
// design's choices for what the document leaves open; first-level BWAs are
// pruned above weight P_MAX = largest power of two <= R_MAX.
module ecc_tag_match
  import ecc_match_pkg::*;
#(
  parameter int unsigned N     = 40,
  parameter int unsigned K     = 33,
  parameter int unsigned T_MAX = 1,
  parameter int unsigned R_MAX = 2,
  // derived, do not override
  localparam int unsigned DW   = $clog2(R_MAX + 2)
) (
  input  logic [N-1:0]  retrieved,  // codeword read from the tag store {data, parity}
  input  logic [K-1:0]  tag,        // incoming tag, not encoded
  output logic          match,
  output logic          mismatch,
  output logic          fault,
  output logic [DW-1:0] dist_sat
);
  localparam int unsigned R     = N - K;
  localparam int unsigned P_MAX = pow2_floor(R_MAX);
  localparam int unsigned ST    = bwa_stages(K);
  localparam int unsigned SP    = bwa_stages(R);
  localparam int unsigned C     = l2_classes(P_MAX);
  localparam int unsigned M2    = 1 << bwa_stages(l2_max_inputs(ST, SP, P_MAX));

  logic [R-1:0]      enc_parity;
  logic [K-1:0]      tag_diff;
  logic [R-1:0]      par_diff;
  logic [(1<<ST)-1:0] tag_cnt;
  logic [(1<<SP)-1:0] par_cnt;
  logic              tag_sat, par_sat;
  logic              or_flag;
  logic [C*M2-1:0]   l2_bits;
  logic [C-1:0]      l2_sat;

  ecc_encoder #(.N(N), .K(K)) u_enc (
    .data  (tag),
    .parity(enc_parity)
  );

  // Data part: needs no encoding, compared immediately.
  xor_bank #(.W(K)) u_xor_tag (
    .a   (retrieved[N-1:R]),
    .b   (tag),
    .diff(tag_diff)
  );

  // Parity part: compared once the encoder is done.
  xor_bank #(.W(R)) u_xor_par (
    .a   (retrieved[R-1:0]),
    .b   (enc_parity),
    .diff(par_diff)
  );

  // First level.
  bwa #(.W(K), .BASE_W(1), .KEEP_MAX(P_MAX)) u_bwa_tag (
    .in (tag_diff),
    .out(tag_cnt),
    .sat(tag_sat)
  );

  bwa #(.W(R), .BASE_W(1), .KEEP_MAX(P_MAX)) u_bwa_par (
    .in (par_diff),
    .out(par_cnt),
    .sat(par_sat)
  );

  // Second level.
  bwa_second_level #(.KT(K), .KP(R), .P_MAX(P_MAX)) u_l2 (
    .tag_cnt(tag_cnt),
    .tag_sat(tag_sat),
    .par_cnt(par_cnt),
    .par_sat(par_sat),
    .or_flag(or_flag),
    .l2_bits(l2_bits),
    .l2_sat (l2_sat)
  );

  decision_unit #(.KT(K), .KP(R), .T_MAX(T_MAX), .R_MAX(R_MAX)) u_dec (
    .or_flag (or_flag),
    .l2_bits (l2_bits),
    .l2_sat  (l2_sat),
    .match   (match),
    .mismatch(mismatch),
    .fault   (fault),
    .dist_sat(dist_sat)
  );
endmodule
