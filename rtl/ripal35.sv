// Command word decoder and latch of the VP1 board.
//
// Each rising clk edge (the command register write strobe) decodes the
// command byte ud[6:0]; a field of 00 leaves its latches unchanged:
//   ud[0]    1: assert the board clear, clr_n <= 0
//   ud[2:1]  01: single word transfer (wordx=1, movem=0)
//            10: block transfer       (wordx=0, movem=1)
//            11: transfers off        (both 0)
//   ud[4:3]  01: channel 1 (sel_ch1=0, sel_ch2=1)   selects are active low
//            10: channel 2 (sel_ch1=1, sel_ch2=0)
//            11: alternate channels (both 1)
//   ud[6:5]  01: test mode off (test_mode_n=1), 10: test mode on (0),
//            00 and 11: unchanged
// Asynchronous controls:
//   clr_reset = ~alt_ack & ~test_mode_n | ~ack & test_mode_n  ends the clear
//               (the acknowledge of the command write releases it; in test
//               mode the alternate acknowledge does);
//   clr_mas   = ~res_n | inter  drops wordx and movem (at reset, and when
//               the state machine raises its completion interrupt);
//   res_n low selects channel 1 and turns test mode off.
// pr_ch1_n (channel 1 preset for the cycle control) is low when channel 1
// is selected, or in alternate mode while the clear is asserted, so
// alternation starts on channel 1.
// The decode table and the set/reset equations are the original part's; the
// ordering of asynchronous controls over the clock is this design's choice.
module ripal35
  import ri_pkg::*;
(
  input  logic       clk,
  input  logic [6:0] ud,
  input  logic       alt_ack,
  input  logic       ack,
  input  logic       res_n,
  input  logic       inter,
  output logic       clr_mas,
  output logic       clr_reset,
  output logic       clr_n,
  output logic       wordx,
  output logic       movem,
  output logic       sel_ch1,
  output logic       sel_ch2,
  output logic       pr_ch1_n,
  output logic       test_mode_n
);

  assign clr_reset = (~alt_ack & ~test_mode_n) | (~ack & test_mode_n);
  assign clr_mas   = ~res_n | inter;

  always_ff @(posedge clk or posedge clr_reset) begin
    if (clr_reset)  clr_n <= 1'b1;
    else if (ud[0]) clr_n <= 1'b0;
  end

  always_ff @(posedge clk or posedge clr_mas) begin
    if (clr_mas) begin
      wordx <= 1'b0;
      movem <= 1'b0;
    end else begin
      case (xfer_cmd_e'(ud[2:1]))
        XFER_WORDX: begin wordx <= 1'b1; movem <= 1'b0; end
        XFER_MOVEM: begin wordx <= 1'b0; movem <= 1'b1; end
        XFER_OFF:   begin wordx <= 1'b0; movem <= 1'b0; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge res_n) begin
    if (!res_n) begin
      sel_ch1 <= 1'b0;
      sel_ch2 <= 1'b1;
    end else begin
      case (chsel_cmd_e'(ud[4:3]))
        CHSEL_CH1: begin sel_ch1 <= 1'b0; sel_ch2 <= 1'b1; end
        CHSEL_CH2: begin sel_ch1 <= 1'b1; sel_ch2 <= 1'b0; end
        CHSEL_ALT: begin sel_ch1 <= 1'b1; sel_ch2 <= 1'b1; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge res_n) begin
    if (!res_n) test_mode_n <= 1'b1;
    else begin
      case (test_cmd_e'(ud[6:5]))
        TEST_OFF: test_mode_n <= 1'b1;
        TEST_ON:  test_mode_n <= 1'b0;
        default: ;
      endcase
    end
  end

  assign pr_ch1_n = ~(~sel_ch1 | (sel_ch1 & sel_ch2 & ~clr_n));

endmodule
