// 16-bit sample packer built from one slice 0 (ripal00) and three lower
// slices (ripal01).
//
// Each rising clk edge takes one 12-bit two's-complement sample din and
// shifts it into the 16-bit word from the top, keeping only its top bits:
//   PACK16  word = sign-extended din                    (1 sample / word)
//   PACK8   word = {din[11:4], word[15:8]}              (2 samples / word)
//   PACK4   word = {din[11:8], word[15:4]}              (4 samples / word)
//   PACK2   word = {din[11:10], word[15:2]}             (8 samples / word)
//   PACK1   word = {din[11], word[15:1]}                (16 samples / word)
// so after N = samples_per_word(p) clocks the word holds N samples, the
// oldest in the lowest bits.  The input clock generator (ripal09) marks
// those word boundaries.  The slice equations are the original ones; the
// wiring between slices (b from two slices up, c from one slice up) and the
// 12-bit sample width are this design's reading of those equations.
module packer16
  import ri_pkg::*;
(
  input  logic        clk,
  input  logic [2:0]  p,
  input  logic [11:0] din,
  output logic [15:0] word
);

  logic [3:0] q0, q1, q2, q3;

  ripal00 u_slice0 (.clk, .p, .a(din[11:8]),                    .q(q0));
  ripal01 u_slice1 (.clk, .p, .a(din[11:8]), .b(din[7:4]), .c(q0), .q(q1));
  ripal01 u_slice2 (.clk, .p, .a(din[7:4]),  .b(q0),       .c(q1), .q(q2));
  ripal01 u_slice3 (.clk, .p, .a(din[3:0]),  .b(q1),       .c(q2), .q(q3));

  assign word = {q0, q1, q2, q3};

endmodule
