// 8-bit synchronous binary down counter with asynchronous clear.
//
// clr_n low clears Q at once.  Rising clk edge: ld_n low loads D;
// otherwise, with both ent and enp high, Q decrements (wrapping from 0 to
// 255); otherwise Q holds.  rco is high while Q is zero and ent is high.
// Outputs are always driven.  This follows the original part.
module ripal04 (
  input  logic       clk,
  input  logic       clr_n,
  input  logic       ld_n,
  input  logic       ent,
  input  logic       enp,
  input  logic [7:0] d,
  output logic [7:0] q,
  output logic       rco
);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n)          q <= '0;
    else if (!ld_n)      q <= d;
    else if (ent && enp) q <= q - 1'b1;
  end

  assign rco = (q == '0) && ent;

endmodule
