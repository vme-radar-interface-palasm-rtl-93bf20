// Self-checking testbench for the VP1 transfer state machine (ripal31),
// revision 1 (default) and revision 0 side by side.  Random inputs, biased
// towards a mode being set, drive both; a reference model written from the
// transition list predicts the state of each after every clock, and the
// state outputs, the bus request and the cycle clock (in both clock phases)
// are compared.  Every transition of the list must be taken at least once.
module tb_ripal31;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  typedef enum int { NUL, ENTER, XFER, EXIT, WINT } st_e;

  logic por_n, movem, wordx, wcc, boundary_x, fifo_emp, ff_ltch, vbr, clr_n,
        ubg, del_ubg, fe_ltch;
  logic       ubr_n[2], mv_init[2], mv_exit[2], inter[2], master[2], cycle_clk[2];
  logic [2:0] bits[2];
  st_e        ref_st[2];
  int checks = 0, failures = 0;
  int taken[string];

  ripal31 #(.REV(0)) dut0 (.clk, .por_n, .movem, .wordx, .wcc, .boundary_x, .fifo_emp,
    .ff_ltch, .vbr, .clr_n, .ubg, .del_ubg, .fe_ltch, .ubr_n(ubr_n[0]),
    .mv_init(mv_init[0]), .mv_exit(mv_exit[0]), .inter(inter[0]), .master(master[0]),
    .bits(bits[0]), .cycle_clk(cycle_clk[0]));
  ripal31 dut1 (.clk, .por_n, .movem, .wordx, .wcc, .boundary_x, .fifo_emp,
    .ff_ltch, .vbr, .clr_n, .ubg, .del_ubg, .fe_ltch, .ubr_n(ubr_n[1]),
    .mv_init(mv_init[1]), .mv_exit(mv_exit[1]), .inter(inter[1]), .master(master[1]),
    .bits(bits[1]), .cycle_clk(cycle_clk[1]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic st_e next_state(st_e s, int rev);
    bit stop  = wcc || (fifo_emp && ff_ltch);
    bit rst   = (rev == 0) ? (boundary_x || fifo_emp) : (boundary_x || fe_ltch);
    bit mgo   = movem && !wordx && !stop;
    bit mstop = movem && !wordx && stop;
    bit wgo   = wordx && !movem && !stop;
    bit wstop = wordx && !movem && stop;
    case (s)
      NUL:   return mgo ? ENTER : wgo ? XFER : NUL;
      ENTER: return mgo ? XFER : EXIT;
      XFER:  return (mgo && !rst) ? XFER : ((mgo && rst) || mstop) ? EXIT :
                    wgo ? XFER : wstop ? WINT : NUL;
      EXIT:  return mstop ? WINT : mgo ? ENTER : NUL;
      default: return NUL;
    endcase
  endfunction

  function automatic logic [2:0] code(st_e s, int rev);
    case (s)
      NUL:   return 3'b000;
      XFER:  return 3'b001;
      WINT:  return 3'b110;
      ENTER: return (rev == 0) ? 3'b100 : 3'b101;
      default: return (rev == 0) ? 3'b101 : 3'b100;  // EXIT
    endcase
  endfunction

  task automatic compare(int i);
    st_e s = ref_st[i];
    bit  b2 = (s == ENTER || s == EXIT || s == WINT);
    checks++;
    if (bits[i] !== code(s, i) || mv_init[i] !== (s == ENTER) || master[i] !== (s == XFER) ||
        mv_exit[i] !== (s == EXIT) || inter[i] !== (s == WINT)) begin
      failures++;
      $display("FAIL rev%0d state bits=%b expected %s", i, bits[i], s.name());
    end
    checks++;
    if (ubr_n[i] !== !(clr_n && ((vbr && s == XFER) || b2)) ||
        cycle_clk[i] !== (!clk && !ubg && ((s == XFER && vbr && !fifo_emp) || (b2 && !del_ubg)))) begin
      failures++;
      $display("FAIL rev%0d ubr_n/cycle_clk in %s clk=%b", i, s.name(), clk);
    end
  endtask

  initial begin
    por_n = 1'b0;
    {movem, wordx, wcc, boundary_x, fifo_emp, ff_ltch, vbr, clr_n, ubg, del_ubg, fe_ltch} = '0;
    ref_st[0] = NUL; ref_st[1] = NUL;
    #2 por_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 6000; n++) begin
      int m;
      m = $urandom_range(0, 9);
      movem = (m < 5); wordx = (m >= 4 && m < 8);
      wcc = ($urandom_range(0, 5) == 0);
      fifo_emp = ($urandom_range(0, 3) == 0);
      ff_ltch = 1'($urandom);
      boundary_x = ($urandom_range(0, 3) == 0);
      fe_ltch = ($urandom_range(0, 3) == 0);
      {vbr, clr_n, ubg, del_ubg} = 4'($urandom);
      #1 compare(0); compare(1);          // low phase
      @(posedge clk);
      for (int i = 0; i < 2; i++) begin
        st_e nx;
        nx = next_state(ref_st[i], i);
        taken[$sformatf("%s->%s", ref_st[i].name(), nx.name())] = 1;
        ref_st[i] = nx;
      end
      #1 compare(0); compare(1);          // high phase
      @(negedge clk);
    end
    begin
      string need[12] = '{"NUL->NUL", "NUL->ENTER", "NUL->XFER", "ENTER->XFER", "ENTER->EXIT",
                         "XFER->XFER", "XFER->EXIT", "XFER->WINT", "XFER->NUL",
                         "EXIT->WINT", "EXIT->ENTER", "WINT->NUL"};
      foreach (need[k]) begin
        checks++;
        if (!taken.exists(need[k])) begin failures++; $display("FAIL never took %s", need[k]); end
      end
    end
    // power-up reset returns to Null at once
    movem = 1'b1; wordx = 1'b0; wcc = 1'b0; fifo_emp = 1'b0;
    @(posedge clk);
    #1 por_n = 1'b0; #1;
    checks++;
    if (bits[0] !== 3'b000 || bits[1] !== 3'b000) begin failures++; $display("FAIL power-up reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
