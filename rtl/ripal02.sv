// Test pattern generator: synchronous binary up counter with load, count
// enable, invert ("toggle") and asynchronous clear.
//
// Rising clk edge, in order of priority:
//   toggle_n low        Q <= ~Q   (every bit inverted each clock)
//   ld_n low            Q <= D
//   enp high            Q <= Q + 1
//   otherwise           Q holds
// clr_n low clears Q at once.  rco is high while Q is all ones.  d[0]/q[0]
// are the least significant bits (D[1]/Q[1] of the original pinout).  The
// behaviour is the original one; the width (8 bits there) is a parameter.
module ripal02 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             clr_n,
  input  logic             ld_n,
  input  logic             enp,
  input  logic             toggle_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             rco
);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n)        q <= '0;
    else if (!toggle_n) q <= ~q;
    else if (!ld_n)    q <= d;
    else if (enp)      q <= q + 1'b1;
  end

  assign rco = &q;

endmodule
