// bwa: butterfly-formed weight accumulator. Counts the ones among W input bits
// and returns the count as a set of output bits, each with a fixed power-of-two
// weight, whose weighted sum is the count.
//
// Structure: the inputs are padded with zeros to N = 2**S. Stage t (1..S)
// splits the wires into blocks of 2**t; inside each block, half adder i adds
// bit i of the left half and bit i of the right half (same weight) and puts
// its carry in slot 2i and its sum in slot 2i+1. For W = 8 this is the
// three-stage, four-HA-per-stage butterfly with output weights
// 8,4,4,2,4,2,2,1 (outputs I..P). The weight of each output slot is given by
// ecc_match_pkg::bwa_weight(); inputs carry the weight BASE_W, so the same
// module serves as a second-level "BWA for 2's", "for 4's" and so on.
//
// Pruning: when only counts up to some limit matter, a half adder whose
// input weight (BASE_W times its local weight) exceeds KEEP_MAX is left out
// and its two input bits are ORed into `sat` instead, as in the reduced BWA
// where the heavy part of the butterfly collapses into one OR gate. `sat`
// set therefore means the count is at least 2*KEEP_MAX (in units of the
// global weight). Output slots fed by a removed half adder read 0. With the
// default KEEP_MAX nothing is removed.
//
// The butterfly itself follows the document; the zero padding of
// non-power-of-two widths and the KEEP_MAX rule that generalises the reduced
// example are this design's choices. Purely combinational: the critical path
// is S half adders (one gate each) plus the OR tree of `sat`.
module bwa
  import ecc_match_pkg::*;
#(
  parameter int unsigned W        = 8,
  parameter int unsigned BASE_W   = 1,
  parameter int unsigned KEEP_MAX = 32'h4000_0000
) (
  input  logic [W-1:0]                in,
  output logic [(1<<bwa_stages(W))-1:0] out,
  output logic                        sat
);
  localparam int unsigned S = bwa_stages(W);
  localparam int unsigned N = 1 << S;

  // st[t*N +: N] holds the wires after stage t; cut collects the inputs of
  // removed half adders, stage by stage.
  logic [(S+1)*N-1:0] st;
  logic [(S+1)*N-1:0] cut;

  assign st[N-1:0]  = N'(in);
  assign cut[N-1:0] = '0;

  for (genvar t = 1; t <= S; t++) begin : g_stage
    localparam int unsigned B = 1 << t;  // block size
    localparam int unsigned H = B / 2;   // half-block size
    for (genvar b = 0; b < N / B; b++) begin : g_block
      for (genvar i = 0; i < H; i++) begin : g_ha
        localparam int unsigned WIN = BASE_W * bwa_weight(t - 1, i);
        localparam int unsigned L   = (t - 1) * N + b * B + i;      // left operand
        localparam int unsigned R   = L + H;                         // right operand
        localparam int unsigned O   = t * N + b * B + 2 * i;         // carry slot, sum at O+1
        if (WIN <= KEEP_MAX) begin : g_keep
          half_adder u_ha (
            .a    (st[L]),
            .b    (st[R]),
            .carry(st[O]),
            .sum  (st[O+1])
          );
          assign cut[O+1:O] = 2'b00;
        end else begin : g_cut
          assign st[O+1:O]  = 2'b00;
          assign cut[O+1:O] = {st[L], st[R]};
        end
      end
    end
  end

  assign out = st[S*N +: N];
  assign sat = |cut;
endmodule
