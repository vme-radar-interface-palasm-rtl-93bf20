// Self-checking testbench for a lower packer slice (ripal01).  Random
// modes and inputs a, b, c each clock; a reference model of the slice's
// mode table predicts Q after every edge.
module tb_ripal01;
  import ri_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [2:0] p;
  logic [3:0] a, b, c, q, exp_q;
  int checks = 0, failures = 0;

  ripal01 dut (.clk, .p, .a, .b, .c, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] modes[8] = '{PACK16, PACK8, PACK4, PACK2, PACK1, 3'b100, 3'b101, 3'b110};
    p = PACK16; a = 4'h5; b = 4'h0; c = 4'h0; exp_q = '0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      case (p)
        PACK16:  exp_q = a;
        PACK8:   exp_q = b;
        PACK4:   exp_q = c;
        PACK2:   exp_q = {c[1], c[0], exp_q[3], exp_q[2]};
        PACK1:   exp_q = {c[0], exp_q[3], exp_q[2], exp_q[1]};
        default: exp_q = 4'h0;
      endcase
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL cycle %0d p=%b q=%h exp=%h", i, p, q, exp_q);
      end
      @(negedge clk);
      p = ($urandom_range(0, 9) < 8) ? modes[$urandom_range(0, 4)] : modes[$urandom_range(5, 7)];
      a = 4'($urandom); b = 4'($urandom); c = 4'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
