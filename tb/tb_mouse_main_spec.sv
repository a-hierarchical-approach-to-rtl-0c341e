// tb_mouse_main_spec: the report scheduler (Main routine).
//
// The Byte routine and the Bit machine's registers are replaced here: a
// responder records each byte handed to Byte and answers after a random
// delay, and a small register model holds XCount/YCount/RightFlag/UpFlag,
// obeys negx/negy/bit_clear like the real machine, and adds random motion
// and button changes only while a byte is being sent (which is when the
// real Bit routine runs).  From the state seen at the end of each loop the
// test predicts the next loop: the Trigger flag is due when the buttons
// changed or a count is non-zero; the five bytes are 1000_0bbb, X, X, Y, Y
// with a count negated when its direction flag is set; `report` pulses
// exactly for loops with the flag set; and at the end of a loop the counts
// hold only the motion added during it (a report clears them at its start).
module tb_mouse_main_spec;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [2:0] buttons = 3'b101;
  logic [7:0] xcount = '0, ycount = '0;
  logic       rightflag = 1'b0, upflag = 1'b0;
  logic       negx, negy, bit_clear;
  logic       byte_start, byte_done = 1'b0;
  logic [7:0] byte_data;
  logic       trigger, report;

  mouse_main_spec dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // Byte stand-in and Bit register model
  logic [7:0] sent[$];
  bit         in_byte = 0;
  int         wait_cnt = 0;
  logic [7:0] mx = 0, my = 0;      // motion added in the current loop
  int         reports_seen = 0;
  always @(posedge clk) begin
    byte_done <= 1'b0;
    if (bit_clear) begin
      xcount <= '0; ycount <= '0; rightflag <= 1'b0; upflag <= 1'b0;
    end else begin
      if (negx) xcount <= 8'd0 - xcount;
      if (negy) ycount <= 8'd0 - ycount;
    end
    if (report) reports_seen++;
    if (byte_start) begin
      sent.push_back(byte_data);
      in_byte  <= 1'b1;
      wait_cnt <= $urandom_range(0, 5);
    end else if (in_byte) begin
      if ($urandom_range(0, 39) == 0) begin
        xcount <= xcount + 8'd1; mx <= mx + 8'd1; rightflag <= 1'($urandom);
      end
      if ($urandom_range(0, 39) == 0) begin
        ycount <= ycount + 8'd1; my <= my + 8'd1; upflag <= 1'($urandom);
      end
      if ($urandom_range(0, 59) == 0) buttons <= 3'($urandom);
      if (wait_cnt == 0) begin
        byte_done <= 1'b1;
        in_byte   <= 1'b0;
      end else begin
        wait_cnt <= wait_cnt - 1;
      end
    end
  end

  initial begin
    logic [2:0] ref_btn, s_btn;
    logic [7:0] s_x, s_y, ex_x, ex_y;
    logic       s_rf, s_uf;
    bit         due;
    int         n_due = 0, n_quiet = 0, n_btn = 0, n_neg = 0, expect_reports = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ref_btn = buttons;
    for (int loop = 0; loop < 300; loop++) begin
      // state at the start of the loop
      s_btn = buttons; s_x = xcount; s_y = ycount; s_rf = rightflag; s_uf = upflag;
      due  = (s_btn != ref_btn) || (s_x != 0) || (s_y != 0);
      ex_x = s_rf ? 8'd0 - s_x : s_x;
      ex_y = s_uf ? 8'd0 - s_y : s_y;
      if (s_btn != ref_btn) n_btn++;
      if (due && (s_rf && s_x != 0 || s_uf && s_y != 0)) n_neg++;
      mx = 0; my = 0;
      sent.delete();
      // wait for the loop's five bytes
      while (sent.size() < 5 || in_byte || byte_start) @(negedge clk);
      check(trigger == due, $sformatf("loop %0d: trigger %0d expected %0d", loop, trigger, due));
      check(sent[0] == {5'b10000, s_btn}, $sformatf("loop %0d: button byte %h", loop, sent[0]));
      if (due) begin
        check(sent[1] == ex_x && sent[2] == ex_x, $sformatf("loop %0d: X bytes %h %h expected %h", loop, sent[1], sent[2], ex_x));
        check(sent[3] == ex_y && sent[4] == ex_y, $sformatf("loop %0d: Y bytes %h %h expected %h", loop, sent[3], sent[4], ex_y));
        n_due++; expect_reports++;
      end else n_quiet++;
      check(xcount == mx && ycount == my, $sformatf("loop %0d: counts %0d/%0d hold only new motion %0d/%0d",
                                                   loop, xcount, ycount, mx, my));
      ref_btn = s_btn;
      repeat (3) @(negedge clk);          // S13, then S2.. of the next loop
    end
    repeat (5) @(negedge clk);          // the last loop's S13
    check(reports_seen == expect_reports, $sformatf("report pulses %0d expected %0d", reports_seen, expect_reports));
    check(n_due > 0 && n_quiet > 0 && n_btn > 0 && n_neg > 0, "report, quiet loop, button change and negation all seen");
    $display("reports=%0d quiet=%0d button_changes=%0d negations=%0d", n_due, n_quiet, n_btn, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
