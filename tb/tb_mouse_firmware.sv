// tb_mouse_firmware: complete serial-mouse firmware on the microcontroller,
// checked against the mouse controller state machines on the same pins.
//
// The testbench assembles a firmware with the three routines of the mouse
// software: Main (button and motion check, Trigger flag, negation, five
// Byte calls), Byte (start bit and eight data bits on RD, one per Bit
// call) and Bit (edge and direction detection on both encoders, then a
// delay loop).  RD is port pin RB7; the firmware also toggles RB6 at the end
// of every Bit call, which the test uses as the bit clock when it decodes
// RD.  The buttons are RB0..RB2 and the encoders RA0..RA3, the same pins the
// mouse_controller_spec machines in the top read, so firmware and machines
// see identical stimulus.
//
// Both serial lines are decoded the same way: RD is sampled once per bit
// time; while idle it must be 1, and a 0 starts a report of 45 samples
// (five frames of a start bit and eight data bits).  Firmware and machines
// run at different speeds, so their reports are not compared one by one;
// instead the encoder steps are applied slowly enough for both to see each
// step once, and for every run of steps (one axis, one direction) the
// reported movements of each side must add up to the number of steps with
// the sign of the direction, and a button change must give one report with
// the new button byte on each side.  The firmware's delay loop is short (a
// bit time of about 1100 clocks); the machines run at their default bit
// time.  Assembling, register use and pin use of the firmware are this
// testbench's own.
module tb_mouse_firmware;
  import pic_pkg::*;
  import pic_tb_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        prog_we = 1'b0;
  pc_t         prog_addr = '0;
  instr_t      prog_wdata = '0;
  byte_t       porta_in = '0, portb_in = '0;
  byte_t       porta_out, porta_oe, portb_out, portb_oe;
  logic        mcu_ready, mcu_sleeping, mcu_skip, mcu_branch, mcu_stack_ovf;
  pc_t         mcu_pc;
  byte_t       mcu_w, mcu_status;
  logic        bit_start = 1'b0, bit_clear = 1'b0;
  logic [7:0]  bit_xcount, bit_ycount;
  logic        bit_rightflag, bit_upflag, bit_busy, bit_done;
  logic        ex_load = 1'b0;
  logic [7:0]  ex_r1_init = '0, ex_r2_init = '0;
  logic [2:0]  ex_b1 = '0, ex_b2 = '0;
  logic        ex_spec_en = 1'b0, ex_impl_en = 1'b0;
  logic [7:0]  ex_spec_r1, ex_spec_r2, ex_impl_r1, ex_impl_r2;
  logic [1:0]  ex_spec_s;
  logic [2:0]  ex_impl_pc;
  logic        ex_spec_halted, ex_impl_halted;
  logic        mouse_rd, mouse_trigger, mouse_report, mouse_bit_tick;

  embedded_system_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endfunction

  // ------------------------------------------------------------ assembler
  localparam logic [6:0] INDF = 7'h00, STATUS = 7'h03, PORTA = 7'h05, PORTB = 7'h06;
  localparam logic [6:0] CSTAT = 7'h20, XCOUNT = 7'h21, FLAGB = 7'h22, YCOUNT = 7'h23,
                         BSTAT = 7'h24, DATA = 7'h25, COUNT = 7'h26, DLY = 7'h27,
                         XS = 7'h28, YS = 7'h29;
  localparam logic [2:0] RIGHT = 3'd3, UP = 3'd4, TRIG = 3'd5;   // FLAGB bits
  localparam logic [7:0] DELAY_LOOPS = 8'd30;

  logic [13:0] image [1024];
  int          lbl [string];
  int          a;

  function automatic logic [10:0] L(string name);
    return lbl.exists(name) ? 11'(lbl[name]) : 11'd0;
  endfunction
  task automatic at(string name); lbl[name] = a; endtask
  task automatic e(logic [13:0] w); image[a] = w; a++; endtask

  task automatic build();
    a = 0;
    for (int i = 0; i < 1024; i++) image[i] = NOP();
    // ---- Main, S1: ports, variables, initial button status
    e(BSF(STATUS, 3'd5));            // bank 1
    e(MOVLW(8'h3F)); e(MOVWF(PORTB)); // TRISB: RB7 (RD) and RB6 (bit clock) outputs
    e(BCF(STATUS, 3'd5));
    e(MOVLW(8'h80)); e(MOVWF(PORTB)); // RD idle high
    e(CLRF(CSTAT)); e(CLRF(XCOUNT)); e(CLRF(YCOUNT)); e(CLRF(FLAGB));
    e(MOVF(PORTB, 0)); e(ANDLW(8'h07)); e(MOVWF(BSTAT));
    at("MAIN");                       // S2: button status changed?
    e(MOVF(PORTB, 0)); e(ANDLW(8'h07)); e(XORWF(BSTAT, 0));
    e(BTFSC(STATUS, 3'd2));
    e(GOTO(L("M4")));
    e(XORWF(BSTAT, 1));               // S3: new reference, trigger
    e(BSF(FLAGB, TRIG));
    at("M4");                         // S4/S5: XCount = 0?
    e(MOVF(XCOUNT, 1));
    e(BTFSS(STATUS, 3'd2));
    e(BSF(FLAGB, TRIG));
    e(BTFSS(FLAGB, RIGHT));           // S6/S7: negate on RightFlag
    e(GOTO(L("M8")));
    e(COMF(XCOUNT, 1)); e(INCF(XCOUNT, 1));
    at("M8");                         // S8/S9: YCount = 0?
    e(MOVF(YCOUNT, 1));
    e(BTFSS(STATUS, 3'd2));
    e(BSF(FLAGB, TRIG));
    e(BTFSS(FLAGB, UP));              // S10/S11: negate on UpFlag
    e(GOTO(L("M12")));
    e(COMF(YCOUNT, 1)); e(INCF(YCOUNT, 1));
    at("M12");                        // S12: copy counts, clear them for a report
    e(MOVF(XCOUNT, 0)); e(MOVWF(XS));
    e(MOVF(YCOUNT, 0)); e(MOVWF(YS));
    e(BTFSS(FLAGB, TRIG));
    e(GOTO(L("SEND")));
    e(CLRF(XCOUNT)); e(CLRF(YCOUNT)); e(BCF(FLAGB, RIGHT)); e(BCF(FLAGB, UP));
    at("SEND");
    e(MOVF(BSTAT, 0)); e(IORLW(8'h80)); e(MOVWF(DATA)); e(CALL(L("BYTE")));
    e(MOVF(XS, 0)); e(MOVWF(DATA)); e(CALL(L("BYTE")));
    e(MOVF(XS, 0)); e(MOVWF(DATA)); e(CALL(L("BYTE")));
    e(MOVF(YS, 0)); e(MOVWF(DATA)); e(CALL(L("BYTE")));
    e(MOVF(YS, 0)); e(MOVWF(DATA)); e(CALL(L("BYTE")));
    e(BCF(FLAGB, TRIG));              // S13
    e(GOTO(L("MAIN")));
    // ---- Byte
    at("BYTE");
    e(MOVLW(8'd8)); e(MOVWF(COUNT));
    e(BTFSS(FLAGB, TRIG));
    e(GOTO(L("B_IDLE")));
    e(BCF(PORTB, 3'd7));              // start bit
    e(GOTO(L("B_CALL")));
    at("B_IDLE");
    e(BSF(PORTB, 3'd7));
    at("B_CALL");
    e(CALL(L("BIT")));
    at("B_LOOP");
    e(BTFSS(FLAGB, TRIG));
    e(GOTO(L("B_NEXT")));
    e(RRF(DATA, 1));                  // least significant bit into carry
    e(BTFSS(STATUS, 3'd0));
    e(GOTO(L("B_ZERO")));
    e(BSF(PORTB, 3'd7));
    e(GOTO(L("B_NEXT")));
    at("B_ZERO");
    e(BCF(PORTB, 3'd7));
    at("B_NEXT");
    e(CALL(L("BIT")));
    e(DECFSZ(COUNT, 1));
    e(GOTO(L("B_LOOP")));
    e(RETURN());
    // ---- Bit: X (RA2 clock, RA3 data), Y (RA0 clock, RA1 data)
    at("BIT");
    e(BTFSS(PORTA, 3'd2));
    e(GOTO(L("X_LOW")));
    e(BTFSC(CSTAT, 3'd2));
    e(GOTO(L("BITY")));
    e(INCF(XCOUNT, 1)); e(BSF(CSTAT, 3'd2)); e(BCF(FLAGB, RIGHT));
    e(BTFSC(PORTA, 3'd3));            // rising edge: right when XData = 0
    e(GOTO(L("BITY")));
    e(BSF(FLAGB, RIGHT));
    e(GOTO(L("BITY")));
    at("X_LOW");
    e(BTFSS(CSTAT, 3'd2));
    e(GOTO(L("BITY")));
    e(INCF(XCOUNT, 1)); e(BCF(CSTAT, 3'd2)); e(BCF(FLAGB, RIGHT));
    e(BTFSS(PORTA, 3'd3));            // falling edge: right when XData = 1
    e(GOTO(L("BITY")));
    e(BSF(FLAGB, RIGHT));
    at("BITY");
    e(BTFSS(PORTA, 3'd0));
    e(GOTO(L("Y_LOW")));
    e(BTFSC(CSTAT, 3'd0));
    e(GOTO(L("BIT_END")));
    e(INCF(YCOUNT, 1)); e(BSF(CSTAT, 3'd0)); e(BCF(FLAGB, UP));
    e(BTFSC(PORTA, 3'd1));
    e(GOTO(L("BIT_END")));
    e(BSF(FLAGB, UP));
    e(GOTO(L("BIT_END")));
    at("Y_LOW");
    e(BTFSS(CSTAT, 3'd0));
    e(GOTO(L("BIT_END")));
    e(INCF(YCOUNT, 1)); e(BCF(CSTAT, 3'd0)); e(BCF(FLAGB, UP));
    e(BTFSS(PORTA, 3'd1));
    e(GOTO(L("BIT_END")));
    e(BSF(FLAGB, UP));
    at("BIT_END");                    // one bit time, then the bit clock
    e(MOVLW(DELAY_LOOPS)); e(MOVWF(DLY));
    at("DLOOP");
    e(DECFSZ(DLY, 1));
    e(GOTO(L("DLOOP")));
    e(MOVLW(8'h40)); e(XORWF(PORTB, 1));
    e(RETURN());
  endtask

  // ------------------------------------------------------------ decoders
  typedef logic [7:0] report_t [5];
  report_t fw_rep[$], hw_rep[$];
  logic    fw_bits[$], hw_bits[$];
  logic    rb6_q = 1'b0;
  int      now = 0, last_report = 0, fw_ticks = 0;

  function automatic report_t frame(ref logic bits[$]);
    report_t r;
    for (int f = 0; f < 5; f++)
      for (int i = 0; i < 8; i++) r[f][i] = bits[9*f + 1 + i];
    return r;
  endfunction

  always @(negedge clk) begin
    now++;
    if (!rst_n) begin
      fw_bits.delete(); hw_bits.delete(); rb6_q = portb_out[6];
    end else begin
      // firmware: RD = RB7, bit clock = a change of RB6
      if (portb_out[6] != rb6_q) begin
        rb6_q = portb_out[6];
        fw_ticks++;
        if (fw_bits.size() > 0 || portb_out[7] == 1'b0) fw_bits.push_back(portb_out[7]);
        if (fw_bits.size() == 45) begin
          for (int f = 0; f < 5; f++) check(fw_bits[9*f] == 1'b0, "firmware start bit");
          fw_rep.push_back(frame(fw_bits));
          fw_bits.delete();
          last_report = now;
        end
      end
      // machines: RD and their own bit clock
      if (mouse_bit_tick) begin
        if (hw_bits.size() > 0 || mouse_rd == 1'b0) hw_bits.push_back(mouse_rd);
        if (hw_bits.size() == 45) begin
          for (int f = 0; f < 5; f++) check(hw_bits[9*f] == 1'b0, "machine start bit");
          hw_rep.push_back(frame(hw_bits));
          hw_bits.delete();
          last_report = now;
        end
      end
    end
  end

  // wait until neither side has sent anything for three firmware loops since
  // the last stimulus or report
  task automatic settle();
    last_report = now;
    do @(negedge clk);
    while (now - last_report < 180_000 || fw_bits.size() > 0 || hw_bits.size() > 0);
  endtask

  // movement reported by one side for an axis, signed by direction
  function automatic int moved(ref report_t reps[$], input bit yaxis, input bit fwd,
                               input logic [2:0] btn, input string who);
    int sum = 0;
    foreach (reps[j]) begin
      logic [7:0] v;
      v = yaxis ? reps[j][3] : reps[j][1];
      check(reps[j][0] == {5'b10000, btn}, {who, " button byte"});
      check(v == (yaxis ? reps[j][4] : reps[j][2]), {who, " coordinate sent twice"});
      check((yaxis ? reps[j][1] : reps[j][3]) == 0, {who, " other axis still"});
      if (fwd) begin check(v[7], {who, " right/up negative"}); sum += 256 - int'(v); end
      else     begin check(!v[7], {who, " left/down positive"}); sum += int'(v); end
    end
    return sum;
  endfunction

  logic xc = 0, yc = 0, xd = 0, yd = 0;
  task automatic step(bit yaxis, bit fwd);
    if (!yaxis) begin xc = ~xc; xd = fwd ? ~xc : xc; end
    else        begin yc = ~yc; yd = fwd ? ~yc : yc; end
    porta_in = {4'b0000, xd, xc, yd, yc};
  endtask

  initial begin
    automatic int n_btn = 0, n_runs = 0;
    build();
    build();                          // second pass resolves forward labels
    // program while in reset, then run
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      prog_we = 1'b1; prog_addr = pc_t'(i); prog_wdata = image[i];
      @(negedge clk);
    end
    prog_we = 1'b0;
    portb_in = 8'h05;
    @(negedge clk);
    rst_n = 1'b1;
    settle();
    check(fw_rep.size() == 0 && hw_rep.size() == 0, "no report without a change");
    check(fw_ticks > 90, "firmware bit clock running");
    for (int phase = 0; phase < 10; phase++) begin
      fw_rep.delete(); hw_rep.delete();
      if (phase % 5 == 0) begin
        portb_in[2:0] = portb_in[2:0] ^ 3'(1 << (phase / 5));
        settle();
        check(fw_rep.size() == 1 && hw_rep.size() == 1,
              $sformatf("one report each per button change: %0d / %0d", fw_rep.size(), hw_rep.size()));
        if (fw_rep.size() > 0) check(fw_rep[0][0] == {5'b10000, portb_in[2:0]}, "firmware button byte");
        if (hw_rep.size() > 0) check(hw_rep[0][0] == {5'b10000, portb_in[2:0]}, "machine button byte");
        n_btn++;
      end else begin
        int n, s_fw, s_hw;
        bit yaxis, fwd;
        n = $urandom_range(1, 12);
        yaxis = phase[1]; fwd = phase[0];
        for (int i = 0; i < n; i++) begin
          step(yaxis, fwd);
          repeat (3000) @(negedge clk);   // longer than either bit time
        end
        settle();
        s_fw = moved(fw_rep, yaxis, fwd, portb_in[2:0], "firmware");
        s_hw = moved(hw_rep, yaxis, fwd, portb_in[2:0], "machine");
        check(fw_rep.size() > 0 && s_fw == n, $sformatf("phase %0d: firmware reported %0d of %0d steps", phase, s_fw, n));
        check(hw_rep.size() > 0 && s_hw == n, $sformatf("phase %0d: machines reported %0d of %0d steps", phase, s_hw, n));
        n_runs++;
      end
    end
    check(n_btn > 0 && n_runs > 0, "button and motion phases ran");
    $display("button_changes=%0d motion_runs=%0d firmware_bit_times=%0d", n_btn, n_runs, fw_ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
