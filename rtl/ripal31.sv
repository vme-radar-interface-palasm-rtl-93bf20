// VP1 board state machine: sequences a transfer from the FIFO board to the
// VME bus.
//
// A Moore machine clocked by the local data-size acknowledge (clk is the
// inverse of UDSACK0*, so it advances once per completed bus cycle).  It
// has five states:
//   Null        idle
//   MovemEnter  announce the start of a block ("movem") transfer (mv_init)
//   DataXfer    move data as bus master (master)
//   MovemExit   announce the end of a block transfer (mv_exit)
//   WrtInter    raise the completion interrupt (inter)
// The conditions come from the transfer mode (movem / wordx, one of them
// set) and the stop test  stop = wcc | (fifo_emp & ff_ltch)  (word count
// complete, or FIFO run empty after it had filled):
//   MovemGo   = movem & ~wordx & ~stop
//   MvRestart = MovemGo & restart,   MovemPark = MovemGo & ~restart
//   MovemStop = movem & ~wordx & stop
//   WordxGo   = wordx & ~movem & ~stop,  WordxStop = wordx & ~movem & stop
// with restart = boundary_x | fe_ltch (REV 1) or boundary_x | fifo_emp
// (REV 0).  Transitions:
//   Null:       MovemGo -> MovemEnter, WordxGo -> DataXfer, else Null
//   MovemEnter: MovemGo -> DataXfer, else MovemExit
//   DataXfer:   MovemPark -> DataXfer, MvRestart or MovemStop -> MovemExit,
//               WordxGo -> DataXfer, WordxStop -> WrtInter, else Null
//   MovemExit:  MovemStop -> WrtInter, MovemGo -> MovemEnter, else Null
//   WrtInter:   -> Null
// State codes {BIT2,BIT1,BIT0}: Null 000, DataXfer 001, WrtInter 110,
// MovemEnter/MovemExit 101/100 (REV 1) or 100/101 (REV 0).  Unused codes go
// to Null with all outputs low (this design's choice).
// Combinational outputs besides the state decode:
//   ubr_n     = ~(clr_n & (vbr & master | BIT2))   local bus request
//   cycle_clk = ~clk & ~ubg & (master & vbr & ~fifo_emp | BIT2 & ~del_ubg)
// cycle_clk is the low phase of clk gated by the conditions, as on the
// original board; it is a clock for the bus cycle logic, not a data signal.
// por_n is the power-up reset into Null.  Everything except the unused
// codes and por_n is the original machine, revision 1 by default.
module ripal31 #(
  parameter int unsigned REV = 1
) (
  input  logic       clk,
  input  logic       por_n,
  input  logic       movem,
  input  logic       wordx,
  input  logic       wcc,
  input  logic       boundary_x,
  input  logic       fifo_emp,
  input  logic       ff_ltch,
  input  logic       vbr,
  input  logic       clr_n,
  input  logic       ubg,
  input  logic       del_ubg,
  input  logic       fe_ltch,
  output logic       ubr_n,
  output logic       mv_init,
  output logic       mv_exit,
  output logic       inter,
  output logic       master,
  output logic [2:0] bits,
  output logic       cycle_clk
);

  localparam logic [2:0] S_NULL     = 3'b000;
  localparam logic [2:0] S_DATAXFER = 3'b001;
  localparam logic [2:0] S_WRTINTER = 3'b110;
  localparam logic [2:0] S_ENTER    = (REV == 0) ? 3'b100 : 3'b101;
  localparam logic [2:0] S_EXIT     = (REV == 0) ? 3'b101 : 3'b100;

  logic [2:0] state, next;
  logic stop, restart, mv_sel, wx_sel;
  logic movem_go, mv_restart, movem_park, movem_stop, wordx_go, wordx_stop;

  assign stop       = wcc | (fifo_emp & ff_ltch);
  assign restart    = (REV == 0) ? (boundary_x | fifo_emp) : (boundary_x | fe_ltch);
  assign mv_sel     = movem & ~wordx;
  assign wx_sel     = ~movem & wordx;
  assign movem_go   = mv_sel & ~stop;
  assign mv_restart = movem_go & restart;
  assign movem_park = movem_go & ~restart;
  assign movem_stop = mv_sel & stop;
  assign wordx_go   = wx_sel & ~stop;
  assign wordx_stop = wx_sel & stop;

  always_comb begin
    next = S_NULL;
    case (state)
      S_NULL: begin
        if (movem_go)      next = S_ENTER;
        else if (wordx_go) next = S_DATAXFER;
      end
      S_ENTER: begin
        if (movem_go) next = S_DATAXFER;
        else          next = S_EXIT;
      end
      S_DATAXFER: begin
        if (movem_park)                    next = S_DATAXFER;
        else if (mv_restart || movem_stop) next = S_EXIT;
        else if (wordx_go)                 next = S_DATAXFER;
        else if (wordx_stop)               next = S_WRTINTER;
      end
      S_EXIT: begin
        if (movem_stop)    next = S_WRTINTER;
        else if (movem_go) next = S_ENTER;
      end
      default: next = S_NULL;  // WrtInter and unused codes
    endcase
  end

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) state <= S_NULL;
    else        state <= next;
  end

  assign bits    = state;
  assign mv_init = (state == S_ENTER);
  assign master  = (state == S_DATAXFER);
  assign mv_exit = (state == S_EXIT);
  assign inter   = (state == S_WRTINTER);

  // At most one of the state outputs is active in any state.
  always_comb begin
    if (por_n)
      assert ($countones({mv_init, master, mv_exit, inter}) <= 1)
        else $error("more than one VP1 state output active");
  end

  assign ubr_n     = ~(clr_n & ((vbr & master) | state[2]));
  assign cycle_clk = ~clk & ~ubg & ((master & vbr & ~fifo_emp) | (state[2] & ~del_ubg));

endmodule
