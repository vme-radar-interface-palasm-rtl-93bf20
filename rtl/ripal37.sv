// 6-bit address counter for the local address lines UA[7:2].
//
// Rising clk edge: ld_n low loads D, otherwise Q increments (no enable;
// wraps from 63 to 0).  rco is high while Q is all ones.  Q is driven onto
// the bus (q_oe) only during a master cycle with the bus granted (master
// high, ubg low).  The two low address lines a[1:0] are driven low whenever
// the bus is granted (a_oe = ~ubg), so transfers are long-word aligned.
// mas_bg_n is low while master and the bus grant coincide.  No reset.
// This follows the original part.
module ripal37 (
  input  logic       clk,
  input  logic       ld_n,
  input  logic       master,
  input  logic       ubg,
  input  logic [5:0] d,
  output logic [5:0] q,
  output logic       q_oe,
  output logic [1:0] a,
  output logic       a_oe,
  output logic       rco,
  output logic       mas_bg_n
);

  always_ff @(posedge clk) begin
    if (!ld_n) q <= d;
    else       q <= q + 1'b1;
  end

  assign rco      = &q;
  assign q_oe     = master & ~ubg;
  assign a        = 2'b00;
  assign a_oe     = ~ubg;
  assign mas_bg_n = ~(master & ~ubg);

endmodule
