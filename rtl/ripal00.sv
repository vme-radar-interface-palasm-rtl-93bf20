// Packer slice 0: the most significant nibble (word[15:12]) of the 16-bit
// sample packer, and the slice where new data enters the word.
//
// On every rising clk edge Q is reloaded according to the packing mode p:
//   PACK16  all four bits take the sample's sign bit a[3] (sign extension)
//   PACK8,
//   PACK4   Q takes the nibble a
//   PACK2   a[3:2] enters at the top and the old Q[3:2] moves to Q[1:0]
//   PACK1   a[3] enters at Q[3] and Q shifts down by one
//   other   Q is cleared
// The mode table and the bit movements are those of the original slice;
// there is no reset, as the original programmable part has none.
module ripal00
  import ri_pkg::*;
(
  input  logic       clk,
  input  logic [2:0] p,
  input  logic [3:0] a,
  output logic [3:0] q
);

  always_ff @(posedge clk) begin
    case (p)
      PACK16:  q <= {4{a[3]}};
      PACK8:   q <= a;
      PACK4:   q <= a;
      PACK2:   q <= {a[3:2], q[3:2]};
      PACK1:   q <= {a[3], q[3:1]};
      default: q <= '0;
    endcase
  end

endmodule
