// Self-checking testbench for the serial transmitter (ripal06).  An
// external 24-bit shift register, advanced by the block's SRCLK, supplies
// SERIN.  The line is sampled after every clock and decoded independently:
// every bit cell must open with a transition, and carry a mid-cell
// transition exactly when its data bit is 1.  Also checked: XmtReady rises
// 50 clocks after the clear (49 counts plus the stop clock), the line
// then idles low, the complement output, and a restart by clear.
module tb_ripal06;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       clr_n, serin, srclk, xmt_ready, serout, serout_n;
  logic [5:0] q;
  logic [23:0] data;
  int idx;
  int checks = 0, failures = 0;

  ripal06 dut (.clk, .clr_n, .serin, .srclk, .q, .xmt_ready, .serout, .serout_n);

  // external data shift register
  always @(posedge srclk) idx <= idx + 1;
  assign serin = (idx < 24) ? data[idx] : 1'b0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_word(logic [23:0] w);
    logic s[0:50];
    int ready_at;
    data = w; idx = 0;
    @(negedge clk);
    clr_n = 1'b0; #1 clr_n = 1'b1;
    s[0] = serout;
    check("idle after clear", serout == 1'b0 && xmt_ready == 1'b0);
    ready_at = -1;
    for (int k = 1; k <= 50; k++) begin
      @(posedge clk); #1;
      s[k] = serout;
      check("complement", serout_n == !serout);
      if (xmt_ready && ready_at < 0) ready_at = k;
    end
    for (int i = 0; i <= 24; i++)
      check($sformatf("cell %0d boundary transition", i), s[2*i+1] != s[2*i]);
    for (int i = 0; i < 24; i++)
      check($sformatf("cell %0d data", i), (s[2*i+2] != s[2*i+1]) == w[i]);
    check($sformatf("ready after 50 clocks (got %0d)", ready_at), ready_at == 50);
    check("line idles low when done", serout == 1'b0 && q == 6'd49);
    repeat (3) @(posedge clk);
    #1 check("stays stopped", xmt_ready && q == 6'd49 && !srclk);
  endtask

  initial begin
    clr_n = 1'b0; idx = 0; data = '0;
    send_word(24'hA5C3_0F);
    send_word(24'hFFFFFF);
    send_word(24'h000000);
    send_word(24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
