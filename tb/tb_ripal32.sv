// Self-checking testbench for the FIFO flag selector (ripal32): all flag
// and select combinations for ef/ff/hf, both positions of the write clock
// select, and the full-flag latch (set by ff, held after ff drops, cleared
// by clr_n, clear winning while both are active).
module tb_ripal32;
  logic efch1_n, efch2_n, ffch1_n, ffch2_n, hfch1_n, hfch2_n, sel_ch1, clr_n;
  logic fifo_clk, soft_fifo_wrt, test_mode_n, ef, ff, hf, ff_ltch, fclk;
  int checks = 0, failures = 0;

  ripal32 dut (.efch1_n, .efch2_n, .ffch1_n, .ffch2_n, .hfch1_n, .hfch2_n, .sel_ch1,
               .clr_n, .fifo_clk, .soft_fifo_wrt, .test_mode_n, .ef, .ff, .hf,
               .ff_ltch, .fclk);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    clr_n = 1'b0;
    for (int v = 0; v < 128; v++) begin
      {efch1_n, efch2_n, ffch1_n, ffch2_n, hfch1_n, hfch2_n, sel_ch1} = v[6:0];
      #1;
      check($sformatf("flags %b", v[6:0]),
            ef == (sel_ch1 ? !efch2_n : !efch1_n) &&
            ff == (sel_ch1 ? !ffch2_n : !ffch1_n) &&
            hf == (sel_ch1 ? !hfch2_n : !hfch1_n));
      check("latch held clear", ff_ltch == 1'b0);
    end
    for (int v = 0; v < 8; v++) begin
      {fifo_clk, soft_fifo_wrt, test_mode_n} = v[2:0];
      #1 check("write clock select", fclk == (test_mode_n ? fifo_clk : soft_fifo_wrt));
    end
    // full-flag latch
    sel_ch1 = 1'b0; ffch1_n = 1'b1; ffch2_n = 1'b0; #1;
    clr_n = 1'b1; #1 check("latch clear after clr", ff_ltch == 1'b0);
    ffch2_n = 1'b1; sel_ch1 = 1'b1; #1 check("other channel not full", ff_ltch == 1'b0);
    ffch2_n = 1'b0; #1 check("latch sets on full", ff_ltch == 1'b1);
    ffch2_n = 1'b1; #1 check("latch holds after full drops", ff_ltch == 1'b1);
    clr_n = 1'b0; #1 check("clr clears latch", ff_ltch == 1'b0);
    ffch2_n = 1'b0; #1 check("clear wins over full", ff_ltch == 1'b0);
    clr_n = 1'b1; #1 check("full still present after clear: set", ff_ltch == 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
