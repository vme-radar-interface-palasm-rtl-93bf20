// 8-bit synchronous binary down counter with three-state outputs.
//
// Rising clk edge: ld_n low loads D; otherwise, with both ent and enp high,
// Q decrements (wrapping from 0 to 255); otherwise Q holds.  rco is high
// while Q is zero and ent is high, so counters cascade by feeding rco to the
// next stage's ent.  The output buffers are represented by q (the value)
// and q_oe (drive enable, high when oe_n is low).  No reset.  All of this
// follows the original part.
module ripal03 (
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

  assign rco  = (q == '0) && ent;
  assign q_oe = ~oe_n;

endmodule
