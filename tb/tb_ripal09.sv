// Self-checking testbench for the input clock generator (ripal09).  For
// each packing mode it counts the gated output pulses over 64 input clocks
// (expected 64 / samples_per_word) and checks that they are evenly spaced.
// The pulse input is the inverted clock, so a pulse fills the low half of
// the clock in which the counter is at zero.  It also checks that no pulse passes before the first clock after the
// clear (en_gate) and that the counter reload values match the modes.
module tb_ripal09;
  import ri_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       clr_n, rco, gated_out, en_gate;
  logic [2:0] p;
  logic [3:0] q;
  int pulses;
  int checks = 0, failures = 0;

  ripal09 dut (.clk, .clr_n, .p, .in_clk(~clk), .q, .rco, .gated_out, .en_gate);

  always @(posedge gated_out) pulses++;

  initial begin
    repeat (3000) @(posedge clk);
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
    logic [2:0] modes[5] = '{PACK16, PACK8, PACK4, PACK2, PACK1};
    int unsigned n;
    int last, gap_err;
    foreach (modes[i]) begin
      p = modes[i];
      n = samples_per_word(p);
      clr_n = 1'b0;
      @(negedge clk);
      // in_clk high while cleared, and after the clear ends: no pulse
      pulses = 0;
      @(posedge clk);
      @(negedge clk); #1;
      check("no pulse while cleared", pulses == 0 && !en_gate);
      clr_n = 1'b1;
      #1 check("no pulse before the first clock", pulses == 0 && !gated_out);
      @(posedge clk); #1;
      check("reload value", q == 4'(n - 1));
      check("en_gate set", en_gate);
      pulses = 0; last = -1; gap_err = 0;
      for (int c = 0; c < 64; c++) begin
        @(negedge clk); #1;
        if (gated_out) begin
          if (last >= 0 && c - last != int'(n)) gap_err++;
          last = c;
        end
      end
      check($sformatf("mode %b: %0d pulses in 64 clocks", p, pulses), pulses == 64 / int'(n));
      check($sformatf("mode %b: evenly spaced", p), gap_err == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
