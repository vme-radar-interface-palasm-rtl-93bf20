// Serial transmitter ("Manchester code transmitter").
//
// A 6-bit counter Q runs from 0 up to STOP_COUNT (49) and then stops; each
// pair of clocks is one bit cell.  While it runs, on every rising clk edge:
//   - SEROUT toggles when Q is even (the transition that opens each cell),
//   - when Q is odd SEROUT toggles only if SERIN is 1 (mid-cell transition),
//   - SRCLK takes Q[0], giving the external shift register one clock per
//     cell to present the next SERIN bit,
//   - XmtReady is 0.
// Once Q reaches STOP_COUNT the counter holds, SEROUT and SRCLK are forced
// low and XmtReady goes high; clr_n low restarts everything at zero
// (asynchronously).  With STOP_COUNT = 49 one run sends 24 data bits plus a
// closing cell transition.  serout_n is the complement of serout for a
// differential line driver.  These equations are the original part's; the
// line code they produce is bi-phase mark (a transition at every cell
// boundary, a second one for a 1).
module ripal06 #(
  parameter int unsigned STOP_COUNT = 49
) (
  input  logic       clk,
  input  logic       clr_n,
  input  logic       serin,
  output logic       srclk,
  output logic [5:0] q,
  output logic       xmt_ready,
  output logic       serout,
  output logic       serout_n
);

  logic stop;
  assign stop = (q == 6'(STOP_COUNT));

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      q         <= '0;
      serout    <= 1'b0;
      srclk     <= 1'b0;
      xmt_ready <= 1'b0;
    end else if (!stop) begin
      q         <= q + 1'b1;
      serout    <= (~q[0] | serin) ^ serout;
      srclk     <= q[0];
      xmt_ready <= 1'b0;
    end else begin
      serout    <= 1'b0;
      srclk     <= 1'b0;
      xmt_ready <= 1'b1;
    end
  end

  assign serout_n = ~serout;

endmodule
