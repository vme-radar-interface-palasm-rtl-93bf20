// Self-checking testbench for the 6-bit address counter (ripal37): load and
// free-running count against a reference model, the carry at 63, and the
// bus drive enables and MasBG for all master/grant combinations.
module tb_ripal37;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       ld_n, master, ubg, q_oe, a_oe, rco, mas_bg_n;
  logic [5:0] d, q, exp_q;
  logic [1:0] a;
  int checks = 0, failures = 0;

  ripal37 dut (.clk, .ld_n, .master, .ubg, .d, .q, .q_oe, .a, .a_oe, .rco, .mas_bg_n);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_n = 1'b0; d = 6'd60; master = 1'b0; ubg = 1'b1; exp_q = '0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      if (!ld_n) exp_q = d; else exp_q = exp_q + 6'd1;
      #1;
      checks++;
      if (q !== exp_q || rco !== (exp_q == 6'h3F)) begin
        failures++; $display("FAIL q=%h exp=%h rco=%b", q, exp_q, rco);
      end
      checks++;
      if (q_oe !== (master && !ubg) || a_oe !== !ubg || a !== 2'b00 ||
          mas_bg_n !== !(master && !ubg)) begin
        failures++; $display("FAIL enables master=%b ubg=%b", master, ubg);
      end
      @(negedge clk);
      ld_n   = ($urandom_range(0, 15) != 0);
      d      = 6'($urandom);
      master = 1'($urandom);
      ubg    = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
