// Packer slice 1..3: one of the three lower nibbles of the 16-bit sample
// packer.
//
// On every rising clk edge Q is reloaded according to the packing mode p:
//   PACK16  Q takes a (this slice's nibble of the sample)
//   PACK8   Q takes b (the nibble eight bits above, i.e. a shift by 8)
//   PACK4   Q takes c (the nibble just above, a shift by 4)
//   PACK2   c[1:0] enters at the top and the old Q[3:2] moves to Q[1:0]
//   PACK1   c[0] enters at Q[3] and Q shifts down by one
//   other   Q is cleared
// The mode table follows the original slice; how a, b and c are wired to
// the neighbouring slices is done in packer16.  No reset.
module ripal01
  import ri_pkg::*;
(
  input  logic       clk,
  input  logic [2:0] p,
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] c,
  output logic [3:0] q
);

  always_ff @(posedge clk) begin
    case (p)
      PACK16:  q <= a;
      PACK8:   q <= b;
      PACK4:   q <= c;
      PACK2:   q <= {c[1:0], q[3:2]};
      PACK1:   q <= {c[0], q[3:1]};
      default: q <= '0;
    endcase
  end

endmodule
