// Self-checking testbench for the slave address decoder (ripal36): all 64
// combinations of address, direction, function code, grant and strobe for
// the decoded strobes; the acknowledge sequence (set by delay_slv, cleared
// when the access ends, enable from vbg); and the IPP latch.
module tb_ripal36;
  logic ua2, ua3, ud7, ipp, delay_slv, urw, fc1, uds_n, vbg;
  logic ipp_reg, ack0_n, ack1_n, ack_oe, alt_ack_n, wrt_adr_n, wrt_wc_n, com_wd_n;
  logic soft_fifo_wrt, rd_status_n, slave;
  int checks = 0, failures = 0;

  ripal36 dut (.*);

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
    ud7 = 1'b0; ipp = 1'b0; delay_slv = 1'b0;
    for (int v = 0; v < 64; v++) begin
      bit sel, wr;
      logic [3:0] exp_wr;
      {ua3, ua2, urw, fc1, uds_n, vbg} = v[5:0];
      #1;
      sel = !fc1 && !vbg && !uds_n;
      wr  = sel && !urw;
      exp_wr = wr ? (4'b0001 << {ua3, ua2}) : 4'b0000;
      check($sformatf("decode %b", v[5:0]),
            slave == sel && rd_status_n == !(sel && urw) &&
            {soft_fifo_wrt, !com_wd_n, !wrt_wc_n, !wrt_adr_n} == exp_wr);
    end
    // acknowledge: a slave access, then the delayed strobe
    {fc1, vbg, urw, ua3, ua2} = 5'b00010;
    uds_n = 1'b0; #5;
    check("no ack before delay", ack0_n && ack1_n && alt_ack_n);
    check("ack driven while vbg low", ack_oe);
    delay_slv = 1'b1; #1;
    check("ack asserted by delay", !ack0_n && !ack1_n && !alt_ack_n);
    delay_slv = 1'b0; #5 check("ack held", !ack0_n);
    uds_n = 1'b1; #1 check("ack released at end of access", ack0_n && ack1_n && alt_ack_n);
    vbg = 1'b1; #1 check("ack not driven while vbg high", !ack_oe);
    delay_slv = 1'b1; #1 check("no ack outside an access", ack0_n);
    delay_slv = 1'b0; vbg = 1'b0;
    // IPP latch
    ipp = 1'b1; #1 check("ipp sets", ipp_reg == 1'b1);
    ipp = 1'b0; {ua3, ua2, urw} = 3'b100; ud7 = 1'b0; uds_n = 1'b0; #1;
    check("command without bit 7 keeps ipp", ipp_reg == 1'b1);
    uds_n = 1'b1; #1; ud7 = 1'b1; uds_n = 1'b0; #1;
    check("command with bit 7 clears ipp", ipp_reg == 1'b0);
    uds_n = 1'b1; #1;
    ipp = 1'b1; #1 check("ipp sets again", ipp_reg == 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
