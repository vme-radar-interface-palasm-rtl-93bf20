// Self-checking testbench for the 4-bit test pattern generator with spare
// gates (ripal17): the counter against a reference model after every edge,
// and the buffer, inverter, AND and NAND outputs for every input value.
module tb_ripal17;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       clr_n, ld_n, enp, toggle_n, in_sig, out_sig, out_inv, and_out, nand_out;
  logic [3:0] d, q, exp_q, g;
  int checks = 0, failures = 0;

  ripal17 dut (.clk, .clr_n, .ld_n, .enp, .toggle_n, .d, .q, .in_sig, .out_sig,
               .out_inv, .g, .and_out, .nand_out);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr_n = 1'b0; ld_n = 1'b1; enp = 1'b0; toggle_n = 1'b1; d = '0; exp_q = '0;
    in_sig = 1'b0; g = '0;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      if (!clr_n)         exp_q = 4'h0;
      else if (!toggle_n) exp_q = ~exp_q;
      else if (!ld_n)     exp_q = d;
      else if (enp)       exp_q = exp_q + 4'd1;
      #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL q=%h exp=%h", q, exp_q); end
      @(negedge clk);
      clr_n    = ($urandom_range(0, 63) != 0);
      toggle_n = ($urandom_range(0, 7) != 0);
      ld_n     = ($urandom_range(0, 7) != 0);
      enp      = ($urandom_range(0, 3) != 0);
      d        = 4'($urandom);
    end
    for (int v = 0; v < 32; v++) begin
      g = v[3:0]; in_sig = v[4];
      #1;
      checks++;
      if (out_sig !== in_sig || out_inv !== !in_sig ||
          and_out !== (g == 4'hF) || nand_out !== (g != 4'hF)) begin
        failures++; $display("FAIL gates g=%h in=%b", g, in_sig);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
