// Self-checking testbench for the command word decoder and latch (ripal35).
// Random command bytes are written (rising clk) with random acknowledges,
// interrupts and resets in between; a reference model written from the
// command table predicts every latch after each step.  Directed parts check
// the clear pulse (asserted by bit 0, released by the acknowledge of the
// current mode) and the channel 1 preset.
module tb_ripal35;
  logic       clk, alt_ack, ack, res_n, inter;
  logic [6:0] ud;
  logic       clr_mas, clr_reset, clr_n, wordx, movem, sel_ch1, sel_ch2, pr_ch1_n, test_mode_n;
  logic       m_clr_n, m_wordx, m_movem, m_s1, m_s2, m_tm_n;
  int checks = 0, failures = 0;

  ripal35 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic compare(string what);
    check({what, ": latches"}, clr_n == m_clr_n && wordx == m_wordx && movem == m_movem &&
          sel_ch1 == m_s1 && sel_ch2 == m_s2 && test_mode_n == m_tm_n);
    check({what, ": decodes"},
          pr_ch1_n == !(!m_s1 || (m_s1 && m_s2 && !m_clr_n)) &&
          clr_mas == (!res_n || inter) &&
          clr_reset == ((!alt_ack && !m_tm_n) || (!ack && m_tm_n)));
  endtask

  // asynchronous effects of the current res_n / inter / acknowledges
  function automatic void model_async();
    if (!res_n) begin m_s1 = 1'b0; m_s2 = 1'b1; m_tm_n = 1'b1; end
    if (!res_n || inter) begin m_wordx = 1'b0; m_movem = 1'b0; end
    if ((!alt_ack && !m_tm_n) || (!ack && m_tm_n)) m_clr_n = 1'b1;
  endfunction

  task automatic write_cmd(logic [6:0] c);
    ud = c; #1;
    clk = 1'b1; #1;
    if ((!alt_ack && !m_tm_n) || (!ack && m_tm_n)) m_clr_n = 1'b1;
    else if (c[0]) m_clr_n = 1'b0;
    if (res_n && !inter) case (c[2:1])
      2'b01: begin m_wordx = 1'b1; m_movem = 1'b0; end
      2'b10: begin m_wordx = 1'b0; m_movem = 1'b1; end
      2'b11: begin m_wordx = 1'b0; m_movem = 1'b0; end
      default: ;
    endcase
    if (res_n) begin
      case (c[4:3])
        2'b01: begin m_s1 = 1'b0; m_s2 = 1'b1; end
        2'b10: begin m_s1 = 1'b1; m_s2 = 1'b0; end
        2'b11: begin m_s1 = 1'b1; m_s2 = 1'b1; end
        default: ;
      endcase
      case (c[6:5])
        2'b01: m_tm_n = 1'b1;
        2'b10: m_tm_n = 1'b0;
        default: ;
      endcase
    end
    model_async();
    #1 compare($sformatf("command %b", c));
    clk = 1'b0; #1;
  endtask

  initial begin
    clk = 1'b0; ud = '0; alt_ack = 1'b1; ack = 1'b1; inter = 1'b0;
    res_n = 1'b1; #1 res_n = 1'b0; #1;
    ack = 1'b0; #1 ack = 1'b1;        // an acknowledge releases the clear
    res_n = 1'b1; #1;
    m_clr_n = 1'b1; m_wordx = 1'b0; m_movem = 1'b0; m_s1 = 1'b0; m_s2 = 1'b1; m_tm_n = 1'b1;
    compare("after reset");
    // directed: clear pulse in normal mode
    write_cmd(7'b0000001);
    check("bit 0 asserts clear", clr_n == 1'b0);
    alt_ack = 1'b0; #1 check("alternate ack ignored outside test mode", clr_n == 1'b0);
    alt_ack = 1'b1; ack = 1'b0; #1 check("ack releases clear", clr_n == 1'b1);
    ack = 1'b1; m_clr_n = 1'b1;
    // directed: alternate channel mode presets channel 1 only while clearing
    write_cmd(7'b0011000);
    check("alternate mode, no clear: no preset", pr_ch1_n == 1'b1);
    write_cmd(7'b0000001);
    check("alternate mode, clearing: preset", pr_ch1_n == 1'b0);
    ack = 1'b0; #1; ack = 1'b1; m_clr_n = 1'b1; #1;
    // random commands and asynchronous events
    for (int i = 0; i < 3000; i++) begin
      alt_ack = ($urandom_range(0, 7) != 0);
      ack     = ($urandom_range(0, 7) != 0);
      #1 model_async();
      inter   = ($urandom_range(0, 15) == 0);
      res_n   = ($urandom_range(0, 31) != 0);
      #1 model_async();
      #1 compare("asynchronous event");
      write_cmd(7'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
