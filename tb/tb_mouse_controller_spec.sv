// tb_mouse_controller_spec: the three routines together, from pins to the
// serial line.
//
// The serial line RD is decoded at the Bit routine's returns (one per bit
// time): while the Trigger flag is set every 45 samples form one report of
// five frames, each a 0 start bit and eight data bits, least significant
// first; while it is clear RD must stay high.  The test works in phases:
// quiet (no report may appear), a button change (one report with the new
// button byte and no motion), and runs of quadrature steps on one axis in
// one direction, made by toggling the axis clock pin with the data pin set
// for the wanted direction.  The steps of a run may be spread over several
// reports; the reported magnitudes must add up to the number of steps, and
// each must carry the sign of the direction (a step right or up is sent
// negated, as the Main routine negates a count whose flag is set).  The
// bit time is shortened to keep the simulation short.
module tb_mouse_controller_spec;

  localparam int unsigned D = 24;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [2:0] buttons = 3'b111;
  logic       xc = 1'b0, xd = 1'b0, yc = 1'b0, yd = 1'b0;
  logic       rd, trigger, report, bit_tick;
  logic [7:0] xcount, ycount;
  logic       rightflag, upflag;

  mouse_controller_spec #(.DELAY_CYCLES(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- decoder
  logic [7:0] rep[$][5];      // decoded reports
  logic       bits[$];
  int         ticks = 0, n_reports = 0, report_pulses = 0;
  always @(negedge clk) begin
    if (report) report_pulses++;
    if (bit_tick) begin
      ticks++;
      if (trigger) begin
        bits.push_back(rd);
        if (bits.size() == 45) begin
          logic [7:0] r[5];
          for (int f = 0; f < 5; f++) begin
            check(bits[9*f] == 1'b0, $sformatf("report %0d frame %0d start bit", n_reports, f));
            for (int i = 0; i < 8; i++) r[f][i] = bits[9*f + 1 + i];
          end
          rep.push_back(r);
          n_reports++;
          bits.delete();
        end
      end else begin
        check(rd == 1'b1, "RD high while no report is due");
        check(bits.size() == 0, "report cut short");
      end
    end
  end

  // stop at the n-th following clock in which the Bit routine returns
  task automatic wait_ticks(int n);
    repeat (n) do @(negedge clk); while (!bit_tick);
  endtask

  // wait until two whole Main loops pass without a report
  task automatic settle();
    int quiet = 0;
    while (quiet < 90) begin
      @(negedge clk);
      if (bit_tick) quiet = trigger ? 0 : quiet + 1;
    end
  endtask

  // one quadrature step of an axis in a direction (right / up = 1)
  task automatic step(bit yaxis, bit fwd);
    if (!yaxis) begin xc = ~xc; xd = fwd ? ~xc : xc; end
    else        begin yc = ~yc; yd = fwd ? ~yc : yc; end
  endtask

  initial begin
    int n_runs = 0, n_btn = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    settle();
    check(rep.size() == 0, "no report without a change");
    for (int phase = 0; phase < 16; phase++) begin
      rep.delete();
      if (phase % 4 == 0) begin
        // button change
        buttons = buttons ^ 3'(1 << (phase / 4 % 3));
        settle();
        check(rep.size() == 1, $sformatf("one report per button change, got %0d", rep.size()));
        if (rep.size() > 0)
          check(rep[0][0] == {5'b10000, buttons} && rep[0][1] == 0 && rep[0][2] == 0 &&
                rep[0][3] == 0 && rep[0][4] == 0,
                $sformatf("button report %h %h %h %h %h", rep[0][0], rep[0][1], rep[0][2], rep[0][3], rep[0][4]));
        n_btn++;
      end else begin
        int n, sum;
        bit yaxis, fwd;
        n = $urandom_range(1, 40);
        yaxis = 1'($urandom); fwd = 1'($urandom);
        if (phase < 4) begin yaxis = phase[1]; fwd = phase[0]; end
        for (int i = 0; i < n; i++) begin
          step(yaxis, fwd);
          wait_ticks($urandom_range(1, 3));
        end
        settle();
        sum = 0;
        foreach (rep[j]) begin
          logic [7:0] v, o;
          v = yaxis ? rep[j][3] : rep[j][1];
          o = yaxis ? rep[j][1] : rep[j][3];
          check(v == (yaxis ? rep[j][4] : rep[j][2]), "coordinate byte sent twice");
          check(o == 0, "other axis still");
          check(rep[j][0] == {5'b10000, buttons}, "button byte unchanged");
          if (fwd) begin check(v[7] || v == 0, "right/up sent negated"); sum += 256 - int'(v); end
          else     begin check(!v[7], "left/down sent as is"); sum += int'(v); end
        end
        check(rep.size() > 0 && sum == n, $sformatf("phase %0d axis %0d dir %0d: %0d steps reported as %0d in %0d reports",
                                                   phase, yaxis, fwd, n, sum, rep.size()));
        n_runs++;
      end
    end
    check(report_pulses == n_reports, $sformatf("report pulses %0d, decoded %0d", report_pulses, n_reports));
    check(n_runs > 0 && n_btn > 0, "motion and button phases ran");
    $display("reports=%0d bit_times=%0d", n_reports, ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
