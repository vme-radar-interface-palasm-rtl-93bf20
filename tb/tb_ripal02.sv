// Self-checking testbench for the 8-bit test pattern generator (ripal02).
// Random toggle/load/enable/clear stimulus is checked against a reference
// model after every edge, including the toggle-over-load priority and the
// all-ones carry; a directed part checks a full 256-clock count cycle and
// that the clear acts without a clock edge.
module tb_ripal02;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       clr_n, ld_n, enp, toggle_n, rco;
  logic [7:0] d, q, exp_q;
  int checks = 0, failures = 0;

  ripal02 dut (.clk, .clr_n, .ld_n, .enp, .toggle_n, .d, .q, .rco);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(posedge clk);
    if (!clr_n)         exp_q = 8'h00;
    else if (!toggle_n) exp_q = exp_q ^ 8'hFF;
    else if (!ld_n)     exp_q = d;
    else if (enp)       exp_q = exp_q + 8'd1;
    #1;
    checks++;
    if (q !== exp_q || rco !== (exp_q == 8'hFF)) begin
      failures++;
      $display("FAIL q=%h exp=%h rco=%b", q, exp_q, rco);
    end
    @(negedge clk);
  endtask

  initial begin
    clr_n = 1'b0; ld_n = 1'b1; enp = 1'b0; toggle_n = 1'b1; d = '0; exp_q = '0;
    @(negedge clk);
    tick();
    clr_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      clr_n    = ($urandom_range(0, 63) != 0);
      toggle_n = ($urandom_range(0, 7) != 0);
      ld_n     = ($urandom_range(0, 7) != 0);
      enp      = ($urandom_range(0, 3) != 0);
      d        = 8'($urandom);
      tick();
    end
    // a full count cycle: 256 enabled clocks bring Q back to where it was
    clr_n = 1'b1; toggle_n = 1'b1; ld_n = 1'b0; d = 8'h00; tick();
    ld_n = 1'b1; enp = 1'b1;
    begin
      int carries = 0;
      repeat (256) begin tick(); if (rco) carries++; end
      checks++;
      if (q !== 8'h00 || carries != 1) begin
        failures++; $display("FAIL full cycle q=%h carries=%0d", q, carries);
      end
    end
    #2 clr_n = 1'b0; #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL async clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
