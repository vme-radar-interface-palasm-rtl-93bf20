// FIFO board slave address decoder.
//
// Decodes local bus slave accesses (fc1 low: data space; vbg low; uds_n
// low: data strobe) to the board's four write registers and its status
// register, all strobes active low except soft_fifo_wrt and slave:
//   write, UA[3:2] = 00  wrt_adr_n      address register
//   write, UA[3:2] = 01  wrt_wc_n       word count register
//   write, UA[3:2] = 10  com_wd_n       command word
//   write, UA[3:2] = 11  soft_fifo_wrt  software FIFO write (test mode)
//   read (urw high)      rd_status_n    status register
// slave is high for any such access.  The acknowledge flip-flop is set by
// the rising edge of delay_slv (a delayed copy of the strobe) and cleared
// as soon as slave drops; it drives UDSACK0*/UDSACK1* (ack0_n, ack1_n,
// driven only while vbg is low: ack_oe) and the always-driven alternate
// acknowledge alt_ack_n.  The original part has a separate identical
// register for each of the three; one register serves all three here.
// ipp_reg is set by a rising edge of ipp and cleared by a command word
// write with bit 7 set.  The equations are the original part's; the
// reading of its inverted-output register controls (a reset drives the pin
// high) follows the note in the part's listing.
module ripal36 (
  input  logic ua2,
  input  logic ua3,
  input  logic ud7,
  input  logic ipp,
  input  logic delay_slv,
  input  logic urw,
  input  logic fc1,
  input  logic uds_n,
  input  logic vbg,
  output logic ipp_reg,
  output logic ack0_n,
  output logic ack1_n,
  output logic ack_oe,
  output logic alt_ack_n,
  output logic wrt_adr_n,
  output logic wrt_wc_n,
  output logic com_wd_n,
  output logic soft_fifo_wrt,
  output logic rd_status_n,
  output logic slave
);

  logic wr_access, com_wd, ipp_clr, ack_q;

  assign slave     = ~fc1 & ~vbg & ~uds_n;
  assign wr_access = slave & ~urw;

  assign wrt_adr_n     = ~(wr_access & ~ua3 & ~ua2);
  assign wrt_wc_n      = ~(wr_access & ~ua3 &  ua2);
  assign com_wd        =   wr_access &  ua3 & ~ua2;
  assign com_wd_n      = ~com_wd;
  assign soft_fifo_wrt =   wr_access &  ua3 &  ua2;
  assign rd_status_n   = ~(slave & urw);

  always_ff @(posedge delay_slv or negedge slave) begin
    if (!slave) ack_q <= 1'b0;
    else        ack_q <= 1'b1;
  end

  assign ack0_n    = ~ack_q;
  assign ack1_n    = ~ack_q;
  assign alt_ack_n = ~ack_q;
  assign ack_oe    = ~vbg;

  assign ipp_clr = com_wd & ud7;

  always_ff @(posedge ipp or posedge ipp_clr) begin
    if (ipp_clr) ipp_reg <= 1'b0;
    else         ipp_reg <= 1'b1;
  end

endmodule
