// Self-checking testbench for packer slice 0 (ripal00).  Random modes and
// nibbles each clock; a reference model of the slice's mode table predicts
// Q after every edge.  The first clock uses a full-load mode so the model
// starts from a known value.
module tb_ripal00;
  import ri_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [2:0] p;
  logic [3:0] a, q, exp_q;
  int checks = 0, failures = 0;

  ripal00 dut (.clk, .p, .a, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] pick_mode();
    logic [2:0] m[8] = '{PACK16, PACK8, PACK4, PACK2, PACK1, 3'b100, 3'b101, 3'b110};
    int r = $urandom_range(0, 19);
    return (r < 8) ? m[r] : m[r % 5];
  endfunction

  initial begin
    p = PACK8; a = 4'h9; exp_q = '0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      case (p)
        PACK16:  exp_q = {4{a[3]}};
        PACK8,
        PACK4:   exp_q = a;
        PACK2:   exp_q = {a[3], a[2], exp_q[3], exp_q[2]};
        PACK1:   exp_q = {a[3], exp_q[3], exp_q[2], exp_q[1]};
        default: exp_q = 4'h0;
      endcase
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL cycle %0d p=%b a=%h q=%h exp=%h", i, p, a, q, exp_q);
      end
      @(negedge clk);
      p = pick_mode();
      a = 4'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
