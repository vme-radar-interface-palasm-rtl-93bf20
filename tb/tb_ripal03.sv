// Self-checking testbench for the 8-bit down counter ripal03.  Random load,
// enable and output-enable stimulus is checked against a reference
// model after every edge; a directed part loads 5 and checks that the carry
// appears after exactly 5 enabled clocks (3 more with ENP held low between).
module tb_ripal03;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       ld_n, ent, enp, oe_n, q_oe, clr_n, rco;
  logic [7:0] d, q, exp_q;
  int checks = 0, failures = 0;

  ripal03 dut (.clk, .ld_n, .ent, .enp, .d, .q, .rco, .oe_n, .q_oe);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs(string what);
    checks++;
    if (q !== exp_q || rco !== ((exp_q == 8'h00) && ent)) begin
      failures++;
      $display("FAIL %s q=%h exp=%h rco=%b", what, q, exp_q, rco);
    end
    checks++;
    if (q_oe !== ~oe_n) begin failures++; $display("FAIL q_oe"); end
  endtask

  task automatic tick();
    @(posedge clk);

    if (!ld_n) exp_q = d;
    else if (ent && enp) exp_q = exp_q - 8'd1;
    #1 check_outputs("random");
    @(negedge clk);
  endtask

  initial begin
    ld_n = 1'b0; ent = 1'b0; enp = 1'b0; oe_n = 1'b0; clr_n = 1'b1; d = 8'h5A;
    exp_q = 8'h00;
    @(negedge clk);
    tick();
    for (int i = 0; i < 3000; i++) begin
      ld_n = ($urandom_range(0, 15) != 0);
      ent  = ($urandom_range(0, 7) != 0);
      enp  = ($urandom_range(0, 7) != 0);
      oe_n = 1'($urandom);
      d    = ($urandom_range(0, 3) == 0) ? (8'h02) : 8'($urandom);

      tick();
    end
    // directed: count of enabled clocks from a load to the carry
    clr_n = 1'b1; ld_n = 1'b0; ent = 1'b1; enp = 1'b1;
    d = 8'd5;
    tick();
    ld_n = 1'b1;
    begin
      int n = 0;
      enp = 1'b0; repeat (3) tick();
      enp = 1'b1;
      while (!rco && n < 20) begin tick(); n++; end
      checks++;
      if (n != 5) begin failures++; $display("FAIL carry after %0d clocks, expected 5", n); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
