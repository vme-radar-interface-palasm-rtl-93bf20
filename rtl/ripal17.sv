// 4-bit test pattern generator with spare gates.
//
// The counter behaves like ripal02 at four bits: on a rising clk edge
// toggle_n low inverts Q, else ld_n low loads D, else enp counts up; clr_n
// low clears Q asynchronously.  There is no carry output.  The rest of the
// part is combinational: out_sig buffers in_sig, out_inv inverts it, and
// and_out / nand_out are the AND and NAND of the four g inputs.  All of
// this is the original part's function.
module ripal17 (
  input  logic       clk,
  input  logic       clr_n,
  input  logic       ld_n,
  input  logic       enp,
  input  logic       toggle_n,
  input  logic [3:0] d,
  output logic [3:0] q,
  input  logic       in_sig,
  output logic       out_sig,
  output logic       out_inv,
  input  logic [3:0] g,
  output logic       and_out,
  output logic       nand_out
);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n)         q <= '0;
    else if (!toggle_n) q <= ~q;
    else if (!ld_n)     q <= d;
    else if (enp)       q <= q + 1'b1;
  end

  assign out_sig  = in_sig;
  assign out_inv  = ~in_sig;
  assign and_out  = &g;
  assign nand_out = ~(&g);

endmodule
