// VIC register write generator.
//
// When the VP1 state machine enters a state that must be reported to the
// VME interface controller (VIC), this block puts that controller's
// register address on UA[7:2] and the value on UD[7:0] and selects the
// controller (uvic_n low).  Purely combinational:
//   mv_init only   -> UD = 0x20, UA[7:0] = 0xD4
//   mv_exit only   -> UD = 0x00, UA[7:0] = 0xD4
//   inter only     -> UD = 0x11, UA[7:0] = 0x80
//   otherwise 0 on both.
// The buses are driven (bus_oe high) and the controller selected only while
// reg_in is high and the local bus is granted (ubg low).  The address and
// data codes are the original part's; three-state pins are represented by
// value plus bus_oe.
module ripal30 (
  input  logic       mv_init,
  input  logic       mv_exit,
  input  logic       inter,
  input  logic       reg_in,
  input  logic       ubg,
  output logic [7:0] ud,
  output logic [7:2] ua,
  output logic       bus_oe,
  output logic       uvic_n
);

  logic init_only, exit_only, inter_only, move_state, inter_state;

  assign init_only   =  mv_init & ~mv_exit & ~inter;
  assign exit_only   = ~mv_init &  mv_exit & ~inter;
  assign inter_only  = ~mv_init & ~mv_exit &  inter;
  assign move_state  =  (mv_init | mv_exit) & ~inter;
  assign inter_state = ~(mv_init | mv_exit) &  inter;

  assign ud = ({8{init_only}}  & 8'h20)
            | ({8{exit_only}}  & 8'h00)
            | ({8{inter_only}} & 8'h11);
  assign ua = ({6{move_state}}  & 6'b110101)
            | ({6{inter_state}} & 6'b100000);

  assign bus_oe = reg_in & ~ubg;
  assign uvic_n = ~(reg_in & ~ubg);

endmodule
