// Self-checking testbench for the master cycle control (ripal33).  It runs
// a series of acknowledged bus cycles (delay rises, then udsack falls and
// rises) and checks: the strobes are asserted by delay and released by the
// acknowledge; qmas follows master at each acknowledge; the channel select
// is preset by pr_ch1_n, forced by sel_ch2 and otherwise alternates once per
// acknowledged master cycle; the read strobes, address clock and word count
// clock follow their equations in every input state.
module tb_ripal33;
  logic udsack, master, ubg, cycle, delay, delay_x, pr_ch1_n, sel_ch2, wrt_adr_n, wrt_wc_n;
  logic uas_n, uds_n, strobe_oe, rd_ch1_n, rd_ch2_n, rd_latch, adr_clk, wc_clk, qmas, ch1;
  int checks = 0, failures = 0;

  ripal33 dut (.*);

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

  task automatic check_comb();
    bit win = master && cycle && !delay;
    check("read strobes", rd_ch1_n == !(ch1 && win) && rd_ch2_n == !(!ch1 && win) && rd_latch == win);
    check("adr_clk", adr_clk == ((qmas && !ubg && !udsack) || !wrt_adr_n));
    check("wc_clk", wc_clk == (win || !wrt_wc_n));
    check("strobe_oe", strobe_oe == !ubg);
  endtask

  // one bus cycle: strobes out on delay, acknowledge, release
  task automatic bus_cycle();
    cycle = 1'b1; #2 check_comb();
    delay = 1'b1; #1;
    check("strobes asserted by delay", !uas_n && !uds_n);
    check_comb();
    udsack = 1'b0; #1;
    check("strobes released by acknowledge", uas_n && uds_n);
    check_comb();
    #2 udsack = 1'b1; delay = 1'b0; cycle = 1'b0; #1;
    check_comb();
  endtask

  initial begin
    logic exp_ch1;
    udsack = 1'b1; master = 1'b0; ubg = 1'b0; cycle = 1'b0; delay = 1'b0; delay_x = 1'b0;
    pr_ch1_n = 1'b1; sel_ch2 = 1'b1; wrt_adr_n = 1'b1; wrt_wc_n = 1'b1;
    // an acknowledge with master low sets qmas low
    udsack = 1'b0; #1 udsack = 1'b1; #1 check("qmas follows master (0)", qmas == 1'b0);
    // channel 2 selected forces ch1 low
    sel_ch2 = 1'b0; #1 check("sel_ch2 forces ch1 low", ch1 == 1'b0);
    sel_ch2 = 1'b1;
    // channel 1 preset
    pr_ch1_n = 1'b0; #1 check("pr_ch1_n presets ch1", ch1 == 1'b1);
    master = 1'b1; bus_cycle();
    check("preset holds ch1", ch1 == 1'b1);
    check("qmas follows master (1)", qmas == 1'b1);
    pr_ch1_n = 1'b1; #1;
    // alternate: ch1 toggles on every acknowledged master cycle
    exp_ch1 = 1'b1;
    for (int i = 0; i < 8; i++) begin
      bus_cycle();
      exp_ch1 = !exp_ch1;
      check($sformatf("alternation step %0d", i), ch1 == exp_ch1);
    end
    // no toggle while the bus is not granted
    ubg = 1'b1; bus_cycle();
    check("no toggle without grant", ch1 == exp_ch1);
    check("strobes not driven without grant", !strobe_oe);
    ubg = 1'b0;
    // slave register writes clock the address and word counters
    wrt_adr_n = 1'b0; #1 check_comb(); check("adr_clk on register write", adr_clk);
    wrt_adr_n = 1'b1; wrt_wc_n = 1'b0; #1 check_comb(); check("wc_clk on register write", wc_clk);
    wrt_wc_n = 1'b1;
    // random combinational sweep
    for (int i = 0; i < 200; i++) begin
      {master, ubg, cycle, delay, wrt_adr_n, wrt_wc_n} = 6'($urandom);
      #1 check_comb();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
