// Self-checking testbench for the VIC register write generator (ripal30):
// all 32 input combinations against a table of the expected register
// address, data, drive enable and controller select.
module tb_ripal30;
  logic mv_init, mv_exit, inter, reg_in, ubg, bus_oe, uvic_n;
  logic [7:0] ud;
  logic [7:2] ua;
  int checks = 0, failures = 0;

  ripal30 dut (.mv_init, .mv_exit, .inter, .reg_in, .ubg, .ud, .ua, .bus_oe, .uvic_n);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [7:0] exp_ud, exp_ua;
      {mv_init, mv_exit, inter, reg_in, ubg} = v[4:0];
      #1;
      // expected full byte address UA[7:0] and data
      case ({mv_init, mv_exit, inter})
        3'b100:  begin exp_ud = 8'h20; exp_ua = 8'hD4; end
        3'b010:  begin exp_ud = 8'h00; exp_ua = 8'hD4; end
        3'b110:  begin exp_ud = 8'h00; exp_ua = 8'hD4; end
        3'b001:  begin exp_ud = 8'h11; exp_ua = 8'h80; end
        default: begin exp_ud = 8'h00; exp_ua = 8'h00; end
      endcase
      checks++;
      if (ud !== exp_ud || {ua, 2'b00} !== exp_ua) begin
        failures++;
        $display("FAIL in=%b ud=%h exp %h ua=%h exp %h", v[4:0], ud, exp_ud, {ua, 2'b00}, exp_ua);
      end
      checks++;
      if (bus_oe !== (reg_in && !ubg) || uvic_n !== !(reg_in && !ubg)) begin
        failures++; $display("FAIL enables in=%b", v[4:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
