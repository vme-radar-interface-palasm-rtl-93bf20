// FIFO flag selector and FIFO write clock select.
//
// Two FIFO channels report active-low empty, full and half-full flags.  The
// selected channel's flags are passed on active high: channel 1 while
// sel_ch1 is low (channel selects are active low), channel 2 otherwise.
//   ef/ff/hf = sel_ch1 ? ~xxch2_n : ~xxch1_n
// ff_ltch remembers that the selected FIFO was full: it is set while ff is
// high and cleared while clr_n is low (clear wins when both are active, a
// choice of this design).  On the original part this is a register whose
// clock is tied off, so only its asynchronous set and reset act: it is a
// set/reset latch, and it is written here as one on purpose.
// fclk is the FIFO write clock: the packer's word clock fifo_clk normally,
// the software write strobe soft_fifo_wrt when test mode is on (test_mode_n
// low).  All equations are the original part's.
module ripal32 (
  input  logic efch1_n,
  input  logic efch2_n,
  input  logic ffch1_n,
  input  logic ffch2_n,
  input  logic hfch1_n,
  input  logic hfch2_n,
  input  logic sel_ch1,
  input  logic clr_n,
  input  logic fifo_clk,
  input  logic soft_fifo_wrt,
  input  logic test_mode_n,
  output logic ef,
  output logic ff,
  output logic hf,
  output logic ff_ltch,
  output logic fclk
);

  assign ef = sel_ch1 ? ~efch2_n : ~efch1_n;
  assign ff = sel_ch1 ? ~ffch2_n : ~ffch1_n;
  assign hf = sel_ch1 ? ~hfch2_n : ~hfch1_n;

  always_latch begin
    if (!clr_n)  ff_ltch = 1'b0;
    else if (ff) ff_ltch = 1'b1;
  end

  assign fclk = test_mode_n ? fifo_clk : soft_fifo_wrt;

endmodule
