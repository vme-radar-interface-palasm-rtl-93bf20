// 8-bit synchronous binary down counter with three-state outputs and a
// carry gated by both enables.
//
// Same counter as ripal03 (ld_n low loads D, ent and enp high decrement,
// else hold), but rco is high only while Q is zero and both ent and enp are
// high, so the carry marks the clock on which the counter actually leaves
// zero.  q/q_oe represent the three-state outputs (q_oe = ~oe_n).  No
// reset.  This follows the original part.
module ripal18 (
  input  logic       clk,
  input  logic       ld_n,
  input  logic       ent,
  input  logic       enp,
  input  logic       oe_n,
  input  logic [7:0] d,
  output logic [7:0] q,
  output logic       q_oe,
  output logic       rco
);

  always_ff @(posedge clk) begin
    if (!ld_n)           q <= d;
    else if (ent && enp) q <= q - 1'b1;
  end

  assign rco  = (q == '0) && ent && enp;
  assign q_oe = ~oe_n;

endmodule
