// Master cycle control: bus strobes, FIFO read strobes and channel
// alternation for transfers in which the board is local bus master.
//
// qmas     master sampled on each rising edge of udsack (the data-size
//          acknowledge, active low), i.e. "master" as of the last cycle end.
// ch1      which FIFO channel is read next (1 = channel 1).  Forced to 1
//          while pr_ch1_n is low (channel 1 preset), to 0 while sel_ch2 is
//          low (channel 2 selected), and otherwise toggled at every
//          acknowledged master cycle (rising edge of qmas & ~ubg & ~udsack),
//          which alternates the channels.
// uas_n,   address and data strobes: asserted (low) by the rising edge of
// uds_n    delay, released when udsack goes low; driven only while the bus
//          is granted (strobe_oe = ~ubg).
// rd_ch1_n/rd_ch2_n  read strobe of the current channel during
//          master & cycle & ~delay; rd_latch is the same window, active high.
// adr_clk  clocks the address counter: once per acknowledged master cycle,
//          or during a slave write to the address register (wrt_adr_n low).
// wc_clk   clocks the word counter: once per master read window, or during a
//          slave write to the word count register (wrt_wc_n low).
// delay_x is a pin of the original part that none of its equations use.
// The equations are the original part's.  Its registers have an inverted
// output, so a "reset" drives the pin high; where both asynchronous
// controls are active the one driving the pin high wins (this design's
// choice).  The registers run on the signal clocks listed above, as on the
// original board.
module ripal33 (
  input  logic udsack,
  input  logic master,
  input  logic ubg,
  input  logic cycle,
  input  logic delay,
  input  logic delay_x,
  input  logic pr_ch1_n,
  input  logic sel_ch2,
  input  logic wrt_adr_n,
  input  logic wrt_wc_n,
  output logic uas_n,
  output logic uds_n,
  output logic strobe_oe,
  output logic rd_ch1_n,
  output logic rd_ch2_n,
  output logic rd_latch,
  output logic adr_clk,
  output logic wc_clk,
  output logic qmas,
  output logic ch1
);

  logic ack_cycle, rd_window;

  assign ack_cycle = qmas & ~ubg & ~udsack;
  assign rd_window = master & cycle & ~delay;

  always_ff @(posedge udsack) qmas <= master;

  always_ff @(posedge ack_cycle or negedge pr_ch1_n or negedge sel_ch2) begin
    if (!pr_ch1_n)     ch1 <= 1'b1;
    else if (!sel_ch2) ch1 <= 1'b0;
    else               ch1 <= ~ch1;
  end

  always_ff @(posedge delay or negedge udsack) begin
    if (!udsack) begin
      uas_n <= 1'b1;
      uds_n <= 1'b1;
    end else begin
      uas_n <= 1'b0;
      uds_n <= 1'b0;
    end
  end

  assign strobe_oe = ~ubg;
  assign rd_ch1_n  = ~(ch1 & rd_window);
  assign rd_ch2_n  = ~(~ch1 & rd_window);
  assign rd_latch  = rd_window;
  assign adr_clk   = ack_cycle | ~wrt_adr_n;
  assign wc_clk    = rd_window | ~wrt_wc_n;

  // The two FIFO channels are never read at the same time.
  always_comb begin
    assert (rd_ch1_n || rd_ch2_n) else $error("both FIFO channels read at once");
  end

  // delay_x has no function in this part; it is kept for the pinout.
  logic unused_delay_x;
  assign unused_delay_x = delay_x;

endmodule
