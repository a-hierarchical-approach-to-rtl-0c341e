// tb_mouse_bit_spec: the motion-detection (Bit) machine.
//
// Encoder pins are set to random levels before each call.  A reference
// computed here from the rule "an edge of the axis clock counts one step;
// the step goes right/up when the data pin is 0 on a rising edge or 1 on a
// falling edge" predicts the counts and flags after every call, and the
// number of clocks from `start` to `done`: one to accept `start`, one per
// state visited, plus the
// DELAY_CYCLES wait (0.833 ms at 1 MHz).  The two RightFlag properties
// (rising XClock with XData = 1 leaves RightFlag clear; with XData = 0 sets
// it) are counted separately; each must occur.  `clear` and the
// negation inputs are tested too.
module tb_mouse_bit_spec;

  localparam int unsigned D = 833;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start = 1'b0, clear = 1'b0, negx = 1'b0, negy = 1'b0;
  logic       xc = 1'b0, xd = 1'b0, yc = 1'b0, yd = 1'b0;
  logic [7:0] xcount, ycount;
  logic       rightflag, upflag, busy, done;

  mouse_bit_spec dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_prop1 = 0, n_prop2 = 0, n_up = 0, n_left = 0;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] ex_x = 0, ex_y = 0;
    logic       ex_rf = 0, ex_uf = 0, cs_x = 0, cs_y = 0;
    int         nstates, clocks;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int call = 0; call < 600; call++) begin
      bit xedge, yedge;
      xc = 1'($urandom); xd = 1'($urandom); yc = 1'($urandom); yd = 1'($urandom);
      // reference
      nstates = 2 + 1 + 1 + 1;                 // S1, S2|S5, S9, S10|S13, S17
      xedge = (xc != cs_x);
      yedge = (yc != cs_y);
      if (xedge) begin
        ex_x++; cs_x = xc;
        ex_rf = xc ? !xd : xd;
        nstates += 2 + (ex_rf ? 1 : 0);
      end
      if (yedge) begin
        ex_y++; cs_y = yc;
        ex_uf = yc ? !yd : yd;
        nstates += 2 + (ex_uf ? 1 : 0);
      end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      clocks = 1;
      while (!done) begin @(negedge clk); clocks++; end
      check(clocks == nstates + D + 1, $sformatf("call %0d took %0d clocks, expected %0d", call, clocks, nstates + D + 1));
      check(xcount == ex_x && ycount == ex_y, $sformatf("counts %0d/%0d exp %0d/%0d", xcount, ycount, ex_x, ex_y));
      check(rightflag == ex_rf && upflag == ex_uf, "flags");
      if (xedge && xc && xd)  begin n_prop1++; check(rightflag == 1'b0, "property 1: rising XC, XD=1 -> RightFlag clear"); end
      if (xedge && xc && !xd) begin n_prop2++; check(rightflag == 1'b1, "property 2: rising XC, XD=0 -> RightFlag set"); end
      if (yedge && ex_uf) n_up++;
      if (xedge && !ex_rf) n_left++;
      check(!busy, "idle after done");
      if (call == 300) begin
        clear = 1'b1; @(negedge clk); clear = 1'b0;
        ex_x = 0; ex_y = 0; ex_rf = 0; ex_uf = 0;
        check(xcount == 0 && ycount == 0 && !rightflag && !upflag, "clear");
      end
      if (call % 50 == 25) begin
        negx = 1'b1; negy = call % 100 == 25; @(negedge clk);
        ex_x = 8'd0 - ex_x;
        if (negy) ex_y = 8'd0 - ex_y;
        negx = 1'b0; negy = 1'b0;
        check(xcount == ex_x && ycount == ex_y, "negate");
      end
    end
    check(n_prop1 > 0 && n_prop2 > 0 && n_up > 0 && n_left > 0, "all movement cases seen");
    $display("prop1=%0d prop2=%0d up=%0d left=%0d", n_prop1, n_prop2, n_up, n_left);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
