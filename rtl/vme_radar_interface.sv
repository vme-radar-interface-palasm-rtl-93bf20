// VME radar interface: packs radar samples into 16-bit words for a FIFO and
// moves them to the VME bus under control of a small command/state-machine
// board, plus the board's test and utility counters.
//
// Signal flow, as wired here:
//   Input side     packer16 packs each 12-bit sample on sample_clk into a
//                  16-bit word (mode pack_mode); ripal09 divides sample_clk
//                  by the samples per word and gates out one write pulse per
//                  complete word.  That pulse is the normal FIFO write clock.
//   FIFO flags     ripal32 selects the flags of the channel chosen by the
//                  command latch, latches "FIFO was full" and chooses the
//                  FIFO write clock (word pulse, or the software write strobe
//                  in test mode).  The FIFOs themselves are outside.
//   Slave access   ripal36 decodes local bus accesses to the board's
//                  registers and acknowledges them; a command word write
//                  clocks the command latch ripal35 (transfer mode, channel
//                  select, test mode, clear).
//   Transfer       ripal31 is the transfer state machine, advanced by the bus
//                  acknowledge; its MvInit/MvExit/Inter states make ripal30
//                  write the matching VIC register, and its Master state
//                  drives ripal33 (strobes, FIFO read strobes, channel
//                  alternation) and the address counter ripal37, which is
//                  clocked by ripal33's adr_clk.
//   Stand-alone    the test pattern generators ripal02/ripal17, the serial
//                  transmitter ripal06 and the counters ripal03/04/05/18
//                  have their own pins: how they are wired on the board is
//                  not known, so they are brought out unchanged.
// Connections follow the signal names the parts share (Master, UBG, CLR,
// SelCh1, SelCh2, PrCh1, TESTMODE, FFLtch, WrtAdr, WrtWC, SoftFifoWrt,
// AltAck, Inter, MvInit, MvExit).  These choices are this design's:
//   - the command latch is clocked by the command word strobe (com_wd),
//   - the state machine's FIFO-empty input is the selected channel's EF,
//   - the board clear CLR also clears the input clock generator, whose
//     pulse input is the inverted sample clock (so a write pulse is the low
//     half of the clock after a word completes, with the word stable),
//   - the state machine is clocked by the inverse of udsack_n, the local
//     bus data-size acknowledge, which is also ripal33's UDSACK,
//   - the shared address lines UA[7:2] are driven by ripal30 during its
//     register writes and by the address counter during master cycles
//     (an assertion checks that the two never drive together).
// Three-state pins are represented by a value and an enable (_oe) output.
module vme_radar_interface (
  // ---- sample input and packer
  input  logic        sample_clk,
  input  logic [2:0]  pack_mode,
  input  logic [11:0] sample,
  output logic [15:0] fifo_wdata,
  output logic        word_clk,       // one pulse per packed word
  output logic        fifo_wclk,      // FIFO write clock after test-mode select
  // ---- FIFO flags (active low, from the two FIFO channels)
  input  logic        efch1_n, efch2_n, ffch1_n, ffch2_n, hfch1_n, hfch2_n,
  output logic        fifo_ef, fifo_ff, fifo_hf, fifo_ff_ltch,
  // ---- local bus, slave side
  input  logic        ua2, ua3,
  input  logic [7:0]  ud_in,
  input  logic        urw, fc1, uds_in_n, vbg, ipp, delay_slv,
  output logic        ack0_n, ack1_n, ack_oe, alt_ack_n,
  output logic        rd_status_n, slave, ipp_reg,
  output logic        wrt_wc_n,
  // ---- command latch
  input  logic        res_n,
  input  logic        ack_n,          // acknowledge that ends the board clear
  output logic        clr_n,
  output logic        wordx, movem, sel_ch1, sel_ch2, test_mode_n,
  // ---- transfer state machine and master cycles
  input  logic        udsack_n,
  input  logic        wcc, boundary_x, vbr, ubg, del_ubg, fe_ltch,
  input  logic        cycle, delay, delay_x,
  input  logic        reg_in,
  input  logic        adr_ld_n,
  input  logic [5:0]  adr_d,
  output logic [2:0]  vp1_state,
  output logic        master, mv_init, mv_exit, inter,
  output logic        ubr_n, cycle_clk,
  output logic        uas_n, uds_n, strobe_oe,
  output logic        rd_ch1_n, rd_ch2_n, rd_latch, wc_clk, ch1,
  output logic        uvic_n,
  output logic [7:0]  ud_out,
  output logic        ud_oe,
  output logic [7:0]  ua_out,
  output logic        ua_oe,          // drive enable for ua_out[7:2]
  output logic        ua_lo_oe,       // drive enable for ua_out[1:0]
  output logic        adr_rco, mas_bg_n,
  // ---- test pattern generator (8 bit)
  input  logic        tpg_clk, tpg_clr_n, tpg_ld_n, tpg_enp, tpg_toggle_n,
  input  logic [7:0]  tpg_d,
  output logic [7:0]  tpg_q,
  output logic        tpg_rco,
  // ---- test pattern generator (4 bit) and spare gates
  input  logic        tpg4_clk, tpg4_clr_n, tpg4_ld_n, tpg4_enp, tpg4_toggle_n,
  input  logic [3:0]  tpg4_d,
  output logic [3:0]  tpg4_q,
  input  logic        buf_in,
  output logic        buf_out, buf_out_n,
  input  logic [3:0]  gate_in,
  output logic        gate_and, gate_nand,
  // ---- serial transmitter
  input  logic        tx_clk, tx_clr_n, tx_serin,
  output logic        tx_srclk, tx_ready, tx_serout, tx_serout_n,
  output logic [5:0]  tx_count,
  // ---- utility counters (three down, one up)
  input  logic        cnt_clk,
  input  logic [3:0]  cnt_ld_n,       // per counter: 03, 04, 05, 18
  input  logic [3:0]  cnt_ent, cnt_enp,
  input  logic [2:0]  cnt_oe_n,       // 03, 05, 18
  input  logic        cnt_clr_n,      // 04
  input  logic [7:0]  cnt_d,
  output logic [7:0]  cnt03_q, cnt04_q, cnt05_q, cnt18_q,
  output logic [2:0]  cnt_q_oe,       // 03, 05, 18
  output logic [3:0]  cnt_rco         // 03, 04, 05, 18
);

  // ------------------------------------------------------------ input side
  logic [3:0] clkgen_q;
  logic       clkgen_rco, clkgen_en;

  packer16 u_packer (
    .clk(sample_clk), .p(pack_mode), .din(sample), .word(fifo_wdata)
  );

  ripal09 u_clkgen (
    .clk(sample_clk), .clr_n(clr_n), .p(pack_mode), .in_clk(~sample_clk),
    .q(clkgen_q), .rco(clkgen_rco), .gated_out(word_clk), .en_gate(clkgen_en)
  );

  // ------------------------------------------------------------ slave side
  logic wrt_adr_n, com_wd_n, soft_fifo_wrt;

  ripal36 u_adrdec (
    .ua2, .ua3, .ud7(ud_in[7]), .ipp, .delay_slv, .urw, .fc1,
    .uds_n(uds_in_n), .vbg,
    .ipp_reg, .ack0_n, .ack1_n, .ack_oe, .alt_ack_n,
    .wrt_adr_n, .wrt_wc_n, .com_wd_n, .soft_fifo_wrt, .rd_status_n, .slave
  );

  logic clr_mas, clr_reset, pr_ch1_n;

  ripal35 u_cmd (
    .clk(~com_wd_n), .ud(ud_in[6:0]), .alt_ack(alt_ack_n), .ack(ack_n),
    .res_n, .inter,
    .clr_mas, .clr_reset, .clr_n, .wordx, .movem, .sel_ch1, .sel_ch2,
    .pr_ch1_n, .test_mode_n
  );

  ripal32 u_flags (
    .efch1_n, .efch2_n, .ffch1_n, .ffch2_n, .hfch1_n, .hfch2_n,
    .sel_ch1, .clr_n, .fifo_clk(word_clk), .soft_fifo_wrt, .test_mode_n,
    .ef(fifo_ef), .ff(fifo_ff), .hf(fifo_hf), .ff_ltch(fifo_ff_ltch),
    .fclk(fifo_wclk)
  );

  // ------------------------------------------------------------ transfers
  ripal31 u_fsm (
    .clk(~udsack_n), .por_n(res_n), .movem, .wordx, .wcc, .boundary_x,
    .fifo_emp(fifo_ef), .ff_ltch(fifo_ff_ltch), .vbr, .clr_n, .ubg, .del_ubg,
    .fe_ltch,
    .ubr_n, .mv_init, .mv_exit, .inter, .master, .bits(vp1_state), .cycle_clk
  );

  logic [7:2] vic_ua;
  logic       vic_oe, adr_clk, qmas;

  ripal30 u_vicwr (
    .mv_init, .mv_exit, .inter, .reg_in, .ubg,
    .ud(ud_out), .ua(vic_ua), .bus_oe(vic_oe), .uvic_n
  );
  assign ud_oe = vic_oe;

  ripal33 u_cycle (
    .udsack(udsack_n), .master, .ubg, .cycle, .delay, .delay_x, .pr_ch1_n,
    .sel_ch2, .wrt_adr_n, .wrt_wc_n,
    .uas_n, .uds_n, .strobe_oe, .rd_ch1_n, .rd_ch2_n, .rd_latch, .adr_clk,
    .wc_clk, .qmas, .ch1
  );

  logic [5:0] adr_q;
  logic       adr_q_oe;
  logic [1:0] adr_lo;

  ripal37 u_adrcnt (
    .clk(adr_clk), .ld_n(adr_ld_n), .master, .ubg, .d(adr_d),
    .q(adr_q), .q_oe(adr_q_oe), .a(adr_lo), .a_oe(ua_lo_oe), .rco(adr_rco),
    .mas_bg_n
  );

  assign ua_out = {(vic_oe ? vic_ua : adr_q), adr_lo};
  assign ua_oe  = vic_oe | adr_q_oe;

  // The VIC register write and the address counter share UA[7:2].
  always_comb begin
    assert (!(vic_oe && adr_q_oe) || !res_n)
      else $error("UA[7:2] driven by the VIC register write and the address counter at once");
  end

  // ------------------------------------------------------------ stand-alone
  ripal02 #(.WIDTH(8)) u_tpg (
    .clk(tpg_clk), .clr_n(tpg_clr_n), .ld_n(tpg_ld_n), .enp(tpg_enp),
    .toggle_n(tpg_toggle_n), .d(tpg_d), .q(tpg_q), .rco(tpg_rco)
  );

  ripal17 u_tpg4 (
    .clk(tpg4_clk), .clr_n(tpg4_clr_n), .ld_n(tpg4_ld_n), .enp(tpg4_enp),
    .toggle_n(tpg4_toggle_n), .d(tpg4_d), .q(tpg4_q),
    .in_sig(buf_in), .out_sig(buf_out), .out_inv(buf_out_n),
    .g(gate_in), .and_out(gate_and), .nand_out(gate_nand)
  );

  ripal06 u_tx (
    .clk(tx_clk), .clr_n(tx_clr_n), .serin(tx_serin), .srclk(tx_srclk),
    .q(tx_count), .xmt_ready(tx_ready), .serout(tx_serout),
    .serout_n(tx_serout_n)
  );

  ripal03 u_cnt03 (
    .clk(cnt_clk), .ld_n(cnt_ld_n[0]), .ent(cnt_ent[0]), .enp(cnt_enp[0]),
    .oe_n(cnt_oe_n[0]), .d(cnt_d), .q(cnt03_q), .q_oe(cnt_q_oe[0]),
    .rco(cnt_rco[0])
  );

  ripal04 u_cnt04 (
    .clk(cnt_clk), .clr_n(cnt_clr_n), .ld_n(cnt_ld_n[1]), .ent(cnt_ent[1]),
    .enp(cnt_enp[1]), .d(cnt_d), .q(cnt04_q), .rco(cnt_rco[1])
  );

  ripal05 u_cnt05 (
    .clk(cnt_clk), .ld_n(cnt_ld_n[2]), .ent(cnt_ent[2]), .enp(cnt_enp[2]),
    .oe_n(cnt_oe_n[1]), .d(cnt_d), .q(cnt05_q), .q_oe(cnt_q_oe[1]),
    .rco(cnt_rco[2])
  );

  ripal18 u_cnt18 (
    .clk(cnt_clk), .ld_n(cnt_ld_n[3]), .ent(cnt_ent[3]), .enp(cnt_enp[3]),
    .oe_n(cnt_oe_n[2]), .d(cnt_d), .q(cnt18_q), .q_oe(cnt_q_oe[2]),
    .rco(cnt_rco[3])
  );

  // Internal observation points that are not pins of the board.
  logic unused_internal;
  assign unused_internal = ^{clkgen_q, clkgen_rco, clkgen_en, clr_mas,
                             clr_reset, qmas};

endmodule
