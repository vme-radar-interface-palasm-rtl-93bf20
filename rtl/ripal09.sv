// Input clock generator: divides the sample clock by the number of samples
// per packed word.
//
// A 4-bit down counter Q is reloaded whenever it reaches zero (rco high) with
// a value set by the packing mode p, Q = {p[2], p[1]&p[0], p[1], |p}:
//   PACK16 -> 0, PACK8 -> 1, PACK4 -> 3, PACK2 -> 7, PACK1 -> 15,
// so rco is high on one clock in 1, 2, 4, 8 or 16 - exactly when the packer
// (packer16) holds a complete word.  gated_out = rco & in_clk & clr_n &
// en_gate passes the sample clock pulse in_clk during that clock; it is the
// FIFO write clock.  en_gate is a flip-flop that is cleared with clr_n and
// set by the first clock after it, so no write pulse is produced before the
// first sample has been packed.  clr_n low clears Q and en_gate
// asynchronously.  All of this follows the original part.
//
// gated_out is a clock gated by combinational logic, as on the original
// board; it is meant to drive a FIFO write clock, not logic in this clock
// domain.  in_clk must be low around the rising clk edge, where rco
// changes, or the gate passes a glitch: this design feeds it the inverted
// sample clock (the original's choice of IN is not known), so each pulse
// is the low half of a clock in which Q is zero.
module ripal09 (
  input  logic       clk,
  input  logic       clr_n,
  input  logic [2:0] p,
  input  logic       in_clk,
  output logic [3:0] q,
  output logic       rco,
  output logic       gated_out,
  output logic       en_gate
);

  assign rco = (q == 4'd0);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      q       <= '0;
      en_gate <= 1'b0;
    end else begin
      en_gate <= 1'b1;
      if (rco) q <= {p[2], p[1] & p[0], p[1], |p};
      else     q <= q - 1'b1;
    end
  end

  assign gated_out = rco & in_clk & clr_n & en_gate;

endmodule
