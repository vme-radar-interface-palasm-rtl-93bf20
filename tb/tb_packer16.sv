// Self-checking testbench for the 16-bit packer (packer16).  For each mode
// it feeds runs of random 12-bit samples and checks
//  - after every clock, the word against a word-level shift model, and
//  - at each word boundary (every 1, 2, 4, 8 or 16 samples), that the word
//    is exactly the kept top bits of the last N samples, oldest lowest.
module tb_packer16;
  import ri_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [2:0]  p;
  logic [11:0] din;
  logic [15:0] word, model;
  int checks = 0, failures = 0;

  packer16 dut (.clk, .p, .din, .word);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned bits_kept(logic [2:0] m);
    case (m)
      PACK16: return 16;
      PACK8:  return 8;
      PACK4:  return 4;
      PACK2:  return 2;
      default: return 1;
    endcase
  endfunction

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s mode=%b got %h exp %h", what, p, got, exp);
    end
  endtask

  initial begin
    logic [2:0] modes[5] = '{PACK16, PACK8, PACK4, PACK2, PACK1};
    logic [11:0] hist[16];
    din = '0; p = PACK16; model = '0;
    @(negedge clk);
    for (int rep = 0; rep < 3; rep++) begin
      foreach (modes[mi]) begin
        int unsigned k, n;
        p = modes[mi];
        k = bits_kept(p);
        n = samples_per_word(p);
        for (int w = 0; w < 6; w++) begin
          for (int s = 0; s < int'(n); s++) begin
            din = 12'($urandom);
            hist[s] = din;
            @(posedge clk);
            if (k == 16) model = {{4{din[11]}}, din};
            else         model = (model >> k) | (16'(din >> (12 - k)) << (16 - k));
            #1 check("shift model", word, model);
            @(negedge clk);
          end
          // word boundary: compose the expected word from the samples
          begin
            logic [15:0] exp_w;
            exp_w = '0;
            if (k == 16) exp_w = {{4{hist[0][11]}}, hist[0]};
            else for (int s = 0; s < int'(n); s++)
              exp_w |= 16'(hist[s] >> (12 - k)) << (k * s);
            check("word boundary", word, exp_w);
          end
        end
      end
    end
    // an unused code clears the word
    p = 3'b100; @(posedge clk); #1 check("unused mode clears", word, 16'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
