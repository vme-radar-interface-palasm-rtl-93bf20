// End-to-end testbench for the VME radar interface (vme_radar_interface),
// at its only configuration.  It plays the local processor (slave register
// accesses), the bus acknowledge, the FIFO flags and the sample source, and
// checks:
//   - reset and the board clear, set by a command and released by ack;
//   - packing in all five modes: every FIFO write carries the top bits of
//     the right samples, and a write happens once per word;
//   - test mode: the FIFO write clock comes from software writes only;
//   - channel select, alternate-channel reads and the full-flag latch;
//   - block transfers through MovemEnter, DataXfer (parked and restarted),
//     MovemExit and WrtInter, ended once by the word count and once by the
//     FIFO running empty after a full; a single word transfer; the VIC
//     register address/data for each reported state; the interrupt dropping
//     the transfer mode; address counting once per acknowledged cycle;
//   - the stand-alone test pattern generators, serial transmitter and
//     counters.
// Each of these mechanisms is counted and must have happened at least once.
module tb_vme_radar_interface;
  import ri_pkg::*;

  // ---------------------------------------------------------------- DUT pins
  logic        sample_clk, word_clk, fifo_wclk;
  logic [2:0]  pack_mode;
  logic [11:0] sample;
  logic [15:0] fifo_wdata;
  logic        efch1_n, efch2_n, ffch1_n, ffch2_n, hfch1_n, hfch2_n;
  logic        fifo_ef, fifo_ff, fifo_hf, fifo_ff_ltch;
  logic        ua2, ua3, urw, fc1, uds_in_n, vbg, ipp, delay_slv;
  logic [7:0]  ud_in;
  logic        ack0_n, ack1_n, ack_oe, alt_ack_n, rd_status_n, slave, ipp_reg, wrt_wc_n;
  logic        res_n, ack_n, clr_n, wordx, movem, sel_ch1, sel_ch2, test_mode_n;
  logic        udsack_n, wcc, boundary_x, vbr, ubg, del_ubg, fe_ltch, cycle, delay, delay_x;
  logic        reg_in, adr_ld_n;
  logic [5:0]  adr_d;
  logic [2:0]  vp1_state;
  logic        master, mv_init, mv_exit, inter, ubr_n, cycle_clk;
  logic        uas_n, uds_n, strobe_oe, rd_ch1_n, rd_ch2_n, rd_latch, wc_clk, ch1, uvic_n;
  logic [7:0]  ud_out, ua_out;
  logic        ud_oe, ua_oe, ua_lo_oe, adr_rco, mas_bg_n;
  logic        tpg_clk, tpg_clr_n, tpg_ld_n, tpg_enp, tpg_toggle_n, tpg_rco;
  logic [7:0]  tpg_d, tpg_q;
  logic        tpg4_clk, tpg4_clr_n, tpg4_ld_n, tpg4_enp, tpg4_toggle_n;
  logic [3:0]  tpg4_d, tpg4_q, gate_in;
  logic        buf_in, buf_out, buf_out_n, gate_and, gate_nand;
  logic        tx_clk, tx_clr_n, tx_serin, tx_srclk, tx_ready, tx_serout, tx_serout_n;
  logic [5:0]  tx_count;
  logic        cnt_clk, cnt_clr_n;
  logic [3:0]  cnt_ld_n, cnt_ent, cnt_enp, cnt_rco;
  logic [2:0]  cnt_oe_n, cnt_q_oe;
  logic [7:0]  cnt_d, cnt03_q, cnt04_q, cnt05_q, cnt18_q;

  vme_radar_interface dut (.*);

  int checks = 0, failures = 0;
  int seen[string];

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic event_seen(string what);
    if (seen.exists(what)) seen[what]++;
    else seen[what] = 1;
  endtask

  // ------------------------------------------------------- FIFO write capture
  logic [15:0] fifo_log[$];
  always @(posedge fifo_wclk) fifo_log.push_back(fifo_wdata);

  // ------------------------------------------------------- local bus slave
  // One slave access: strobe, delayed acknowledge, release.
  task automatic slave_write(logic [1:0] reg_sel, logic [7:0] data);
    {ua3, ua2} = reg_sel; ud_in = data; urw = 1'b0; fc1 = 1'b0;
    #10 uds_in_n = 1'b0;
    #10 delay_slv = 1'b1;
    #1 check("slave write acknowledged", !ack0_n && !ack1_n && ack_oe);
    #10 uds_in_n = 1'b1; delay_slv = 1'b0;
    #1 check("slave acknowledge released", ack0_n && alt_ack_n);
    #10;
  endtask

  task automatic command(logic [7:0] c);
    slave_write(2'b10, c);
  endtask

  task automatic pulse_ack();
    #5 ack_n = 1'b0; #5 ack_n = 1'b1; #5;
  endtask

  // ------------------------------------------------------- master bus cycles
  logic tb_qmas = 1'b0;
  always @(posedge udsack_n) tb_qmas <= master;

  // One acknowledge on the local bus: advances the state machine (on the
  // falling edge) and ends a master cycle.
  task automatic bus_ack();
    #5 cycle = 1'b1;
    #5 delay = 1'b1;
    #1 if (ubg == 1'b0) check("address/data strobes asserted", !uas_n && !uds_n && strobe_oe);
    #4 udsack_n = 1'b0;
    #1 check("strobes released on acknowledge", uas_n && uds_n);
    #9 udsack_n = 1'b1; delay = 1'b0; cycle = 1'b0;
    #5;
  endtask

  // Check the VIC register write for the current state.
  task automatic check_vic();
    logic [7:0] exp_d, exp_a;
    reg_in = 1'b1; #2;
    if (mv_init)      begin exp_d = 8'h20; exp_a = 8'hD4; event_seen("VIC write MvInit"); end
    else if (mv_exit) begin exp_d = 8'h00; exp_a = 8'hD4; event_seen("VIC write MvExit"); end
    else if (inter)   begin exp_d = 8'h11; exp_a = 8'h80; event_seen("VIC write Inter"); end
    else              begin exp_d = 8'h00; exp_a = 8'h00; end
    check($sformatf("VIC register write in state %b", vp1_state),
          ud_out == exp_d && ua_out == exp_a && ud_oe && ua_oe && !uvic_n);
    reg_in = 1'b0; #2;
    check("VIC released", uvic_n && !ud_oe);
  endtask

  // --------------------------------------------------------------- packing
  task automatic run_packing(logic [2:0] mode, int words);
    int unsigned n, k;
    logic [11:0] s[$];
    pack_mode = mode;
    n = samples_per_word(mode);
    k = (mode == PACK16) ? 16 : 16 / n;
    // clear with the sample clock stopped, so the first word starts with
    // the first sample
    command(8'h01);
    check("clear asserted by command", clr_n == 1'b0);
    #20 check("no FIFO write while cleared", !word_clk);
    pulse_ack();
    check("clear released by acknowledge", clr_n == 1'b1);
    event_seen("board clear");
    fifo_log.delete();
    for (int i = 0; i < words * int'(n); i++) begin
      sample = 12'($urandom);
      s.push_back(sample);
      #10 sample_clk = 1'b1;
      #10 sample_clk = 1'b0;
    end
    #10;
    check($sformatf("mode %b: %0d words written (expected %0d)", mode, fifo_log.size(), words),
          fifo_log.size() == words);
    for (int w = 0; w < words && w < fifo_log.size(); w++) begin
      logic [15:0] exp_w;
      exp_w = '0;
      if (k == 16) exp_w = {{4{s[w][11]}}, s[w]};
      else for (int j = 0; j < int'(n); j++)
        exp_w |= 16'(s[w * n + j] >> (12 - k)) << (k * j);
      check($sformatf("mode %b word %0d = %h (expected %h)", mode, w, fifo_log[w], exp_w),
            fifo_log[w] == exp_w);
    end
    if (fifo_log.size() == words) event_seen($sformatf("packing mode %b", mode));
  endtask

  // ----------------------------------------------------------------- main
  initial begin
    // idle pin values
    sample_clk = 1'b0; pack_mode = PACK16; sample = '0;
    {efch1_n, efch2_n, ffch1_n, ffch2_n, hfch1_n, hfch2_n} = '1;
    {ua2, ua3, urw, fc1} = '0; uds_in_n = 1'b1; vbg = 1'b0; ipp = 1'b0; delay_slv = 1'b0;
    ud_in = '0; ack_n = 1'b1; udsack_n = 1'b1;
    {wcc, boundary_x, vbr, ubg, del_ubg, fe_ltch, cycle, delay, delay_x} = '0;
    reg_in = 1'b0; adr_ld_n = 1'b1; adr_d = '0;
    {tpg_clk, tpg_ld_n, tpg_enp, tpg_toggle_n} = 4'b0101; tpg_clr_n = 1'b1; tpg_d = '0;
    {tpg4_clk, tpg4_ld_n, tpg4_enp, tpg4_toggle_n} = 4'b0101; tpg4_clr_n = 1'b1; tpg4_d = '0;
    buf_in = 1'b0; gate_in = '0;
    tx_clk = 1'b0; tx_clr_n = 1'b1; tx_serin = 1'b0;
    cnt_clk = 1'b0; cnt_clr_n = 1'b1; cnt_ld_n = '1; cnt_ent = '0; cnt_enp = '0;
    cnt_oe_n = '0; cnt_d = '0;

    // ---- reset
    res_n = 1'b1; #5 res_n = 1'b0; #5;
    pulse_ack();
    res_n = 1'b1; #5;
    check("reset state", vp1_state == 3'b000 && !wordx && !movem && !sel_ch1 && sel_ch2 &&
          test_mode_n && clr_n);

    // ---- packing in every mode
    run_packing(PACK16, 6);
    run_packing(PACK8, 5);
    run_packing(PACK4, 4);
    run_packing(PACK2, 3);
    run_packing(PACK1, 3);

    // ---- test mode: FIFO written by software only
    command(8'h40);                                  // test mode on
    check("test mode on", !test_mode_n);
    fifo_log.delete();
    repeat (8) begin #10 sample_clk = 1'b1; #10 sample_clk = 1'b0; end
    check("no packer writes in test mode", fifo_log.size() == 0);
    slave_write(2'b11, 8'h00);                       // software FIFO write
    check("software write clocks the FIFO", fifo_log.size() == 1);
    if (fifo_log.size() == 1) event_seen("test mode software write");
    command(8'h01);                                  // clear, released by the alternate ack
    check("test mode clear released by alternate ack", clr_n == 1'b1);
    command(8'h20);                                  // test mode off
    check("test mode off", test_mode_n);

    // ---- channel select and the full-flag latch
    command(8'h10);                                  // channel 2
    efch2_n = 1'b0; #1 check("channel 2 flags selected", fifo_ef && sel_ch1 && !sel_ch2);
    efch2_n = 1'b1;
    command(8'h08);                                  // channel 1
    hfch1_n = 1'b0; #1 check("channel 1 flags selected", fifo_hf && !sel_ch1);
    hfch1_n = 1'b1;
    ffch1_n = 1'b0; #5 ffch1_n = 1'b1; #1;
    check("full flag latched", fifo_ff_ltch && !fifo_ff);
    if (fifo_ff_ltch) event_seen("full flag latched");
    command(8'h01); pulse_ack();
    check("full flag latch cleared by clear", !fifo_ff_ltch);

    // ---- block transfer, alternating channels, stopped by the word count
    command(8'h18);                                  // alternate channels
    command(8'h01);                                  // clear presets channel 1
    check("channel 1 preset while clearing", ch1);
    pulse_ack();
    adr_ld_n = 1'b0; adr_d = 6'd10;
    slave_write(2'b00, 8'h00);                       // load the address counter
    adr_ld_n = 1'b1;
    check("address counter loaded", ua_out[7:2] == 6'd10 || !ua_oe);
    vbr = 1'b1;
    command(8'h04);                                  // movem
    check("movem mode", movem && !wordx);
    bus_ack(); check("Null -> MovemEnter", mv_init); check_vic();
    check("bus requested in MovemEnter", !ubr_n);
    bus_ack(); check("MovemEnter -> DataXfer", master);
    begin
      int acks = 0, toggles = 0, adr_steps = 0, cyc = 0;
      logic last_ch1;
      logic [5:0] adr0;
      last_ch1 = ch1;
      #1 adr0 = ua_out[7:2];
      check("bus requested in DataXfer", !ubr_n && ua_oe);
      repeat (6) begin
        // read window of this master cycle: strobe the current channel
        cycle = 1'b1; #1;
        check("read strobe of the current channel", rd_ch1_n == !ch1 && rd_ch2_n == ch1 && rd_latch);
        cycle = 1'b0;
        fork
          begin bus_ack(); end
          begin repeat (4) begin @(posedge cycle_clk); cyc++; end end
        join_any
        disable fork;
        acks++;
        check("MovemPark keeps DataXfer", master);
        if (ch1 != last_ch1) toggles++;
        last_ch1 = ch1;
      end
      event_seen("MovemPark");
      adr_steps = int'(ua_out[7:2] - adr0);
      check($sformatf("address counted once per cycle (%0d)", adr_steps), adr_steps == acks);
      check($sformatf("channels alternate (%0d toggles)", toggles), toggles == acks);
      check("cycle clock runs in DataXfer", cyc > 0);
      if (toggles == acks) event_seen("channel alternation");
      if (adr_steps == acks) event_seen("address counting");
      if (cyc > 0) event_seen("cycle clock");
    end
    // boundary crossing restarts the block transfer
    boundary_x = 1'b1;
    bus_ack(); check("MvRestart -> MovemExit", mv_exit); check_vic();
    event_seen("MvRestart");
    boundary_x = 1'b0;
    bus_ack(); check("MovemExit -> MovemEnter", mv_init);
    bus_ack(); check("MovemEnter -> DataXfer", master);
    wcc = 1'b1;
    bus_ack(); check("MovemStop -> MovemExit", mv_exit);
    bus_ack(); check("MovemExit -> WrtInter", inter); check_vic();
    check("interrupt drops the transfer mode", !movem && !wordx);
    event_seen("MovemStop by word count");
    wcc = 1'b0;
    bus_ack(); check("WrtInter -> Null", vp1_state == 3'b000);

    // ---- block transfer stopped by the FIFO running empty after a full
    command(8'h0C);                                  // channel 1, movem
    ffch1_n = 1'b0; #5 ffch1_n = 1'b1;
    check("full flag latched again", fifo_ff_ltch);
    bus_ack(); bus_ack(); check("in DataXfer again", master);
    efch1_n = 1'b0;
    bus_ack(); check("empty after full: MovemStop -> MovemExit", mv_exit);
    bus_ack(); check("-> WrtInter", inter);
    if (inter) event_seen("MovemStop by FIFO empty");
    efch1_n = 1'b1;
    bus_ack();
    command(8'h01); pulse_ack();

    // ---- single word transfer
    command(8'h02);                                  // wordx
    check("wordx mode", wordx && !movem);
    bus_ack(); check("WordxGo: Null -> DataXfer", master);
    bus_ack(); check("WordxGo keeps DataXfer", master);
    wcc = 1'b1;
    bus_ack(); check("WordxStop -> WrtInter", inter); check_vic();
    if (inter) event_seen("single word transfer");
    wcc = 1'b0;
    bus_ack(); check("back to Null", vp1_state == 3'b000);

    // ---- IPP latch
    ipp = 1'b1; #5 ipp = 1'b0;
    check("IPP latched", ipp_reg);
    command(8'h80);
    check("IPP cleared by command bit 7", !ipp_reg);
    if (!ipp_reg) event_seen("IPP latch");

    // ---- stand-alone: 8-bit test pattern generator
    tpg_clr_n = 1'b0; #5 tpg_clr_n = 1'b1;
    tpg_ld_n = 1'b0; tpg_d = 8'hFD;
    #5 tpg_clk = 1'b1; #5 tpg_clk = 1'b0; tpg_ld_n = 1'b1; tpg_enp = 1'b1;
    #5 tpg_clk = 1'b1; #5 tpg_clk = 1'b0;
    #5 tpg_clk = 1'b1; #5 tpg_clk = 1'b0;
    check("pattern generator counts to its carry", tpg_q == 8'hFF && tpg_rco);
    tpg_toggle_n = 1'b0;
    #5 tpg_clk = 1'b1; #5 tpg_clk = 1'b0;
    check("pattern generator toggles", tpg_q == 8'h00);
    #5 tpg_clk = 1'b1; #5 tpg_clk = 1'b0;
    check("pattern generator toggles back", tpg_q == 8'hFF);
    tpg_toggle_n = 1'b1;
    event_seen("pattern toggle");

    // ---- 4-bit generator and gates
    tpg4_clr_n = 1'b0; #5 tpg4_clr_n = 1'b1; tpg4_enp = 1'b1;
    repeat (5) begin #5 tpg4_clk = 1'b1; #5 tpg4_clk = 1'b0; end
    gate_in = 4'hF; buf_in = 1'b1; #1;
    check("4-bit generator and gates", tpg4_q == 4'd5 && gate_and && !gate_nand && buf_out && !buf_out_n);

    // ---- serial transmitter: all ones gives two transitions per cell
    begin
      int edges = 0, clocks = 0;
      logic last;
      tx_serin = 1'b1;
      tx_clr_n = 1'b0; #5 tx_clr_n = 1'b1;
      last = tx_serout;
      while (!tx_ready && clocks < 100) begin
        #5 tx_clk = 1'b1; #1;
        if (tx_serout != last) edges++;
        last = tx_serout;
        #4 tx_clk = 1'b0; clocks++;
      end
      check($sformatf("transmitter done after 50 clocks (%0d)", clocks), clocks == 50);
      check($sformatf("transmitter line transitions (%0d)", edges), edges == 49 + 1);
      if (tx_ready) event_seen("serial word sent");
    end

    // ---- counters: load 3 (down) / 252 (up) and count to the carry
    cnt_ent = '0; cnt_enp = '1;
    cnt_ld_n = 4'b0100; cnt_d = 8'd3;
    #5 cnt_clk = 1'b1; #5 cnt_clk = 1'b0;
    cnt_ld_n = 4'b1011; cnt_d = 8'd252;
    #5 cnt_clk = 1'b1; #5 cnt_clk = 1'b0;
    cnt_ld_n = 4'b1111; cnt_ent = '1;
    begin
      int n = 0;
      while (cnt_rco != 4'b1111 && n < 10) begin
        #5 cnt_clk = 1'b1; #5 cnt_clk = 1'b0; n++;
      end
      check($sformatf("counters reach their carry after 3 clocks (%0d)", n), n == 3 &&
            cnt03_q == 0 && cnt04_q == 0 && cnt18_q == 0 && cnt05_q == 8'hFF &&
            cnt_q_oe == 3'b111);
      if (n == 3) event_seen("counter carries");
    end

    // ---- every mechanism happened
    begin
      string need[] = '{"board clear", "packing mode 000", "packing mode 001", "packing mode 010",
        "packing mode 011", "packing mode 111", "test mode software write", "full flag latched",
        "VIC write MvInit", "VIC write MvExit", "VIC write Inter", "MovemPark", "MvRestart",
        "channel alternation", "address counting", "cycle clock", "MovemStop by word count",
        "MovemStop by FIFO empty", "single word transfer", "IPP latch", "pattern toggle",
        "serial word sent", "counter carries"};
      foreach (need[i]) begin
        checks++;
        if (!seen.exists(need[i])) begin
          failures++;
          $display("FAIL mechanism never happened: %s", need[i]);
        end else $display("mechanism %-28s x%0d", need[i], seen[need[i]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
