// tb_embedded_system_top: end-to-end test of the whole design at its
// default parameters.
//
// Mouse part.  The microcontroller is programmed with motion-detection
// firmware (the X and Y sections of the Bit routine, called in a loop by a
// main program that first clears its variables through indirect
// addressing).  Random encoder pin levels are applied on port A; after each
// change the Bit reference machine is started on the same pins, and once
// the firmware has finished a full pass its XCOUNT, YCOUNT, RightFlag and
// UpFlag (RAM) are compared with the machine's outputs.  This is done
// twice: with the corrected firmware, where no difference may appear, and
// with the firmware whose test of XData after a rising XClock uses BTFSS
// instead of BTFSC, where a RightFlag difference must be found.  A final
// program makes nine nested calls (stack overflow) and executes SLEEP.
//
// Mouse controller machines.  They run from reset on the same pins.  Every
// report on RD is decoded and must consist of five frames with 0 start
// bits and a button byte 1000_0bbb; RD must be high at every bit time
// without a report.  At the end a button is pressed and a report with the
// new button byte must follow.
//
// Example part.  The program machine runs freely; the flowchart machine is
// enabled only while the program is at instructions 1, 2 and 4, so each of
// its states lines up with the end of the corresponding instructions.  At
// every pass through instruction 2 and after both halt, R1 and R2 of the
// two machines must agree.
//
// Mechanisms counted (each must occur): skipped instructions, branches
// (two-cycle instructions), a stack overflow, SLEEP, rising and falling
// encoder clock edges, right and up movements, example loop passes,
// reports of the mouse controller machines.
module tb_embedded_system_top;
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
  logic        ex_spec_en, ex_impl_en = 1'b0;
  logic [7:0]  ex_spec_r1, ex_spec_r2, ex_impl_r1, ex_impl_r2;
  logic [1:0]  ex_spec_s;
  logic [2:0]  ex_impl_pc;
  logic        ex_spec_halted, ex_impl_halted;
  logic        mouse_rd, mouse_trigger, mouse_report, mouse_bit_tick;

  embedded_system_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_skip = 0, n_branch = 0, n_ovf = 0, n_sleep = 0;
  int n_rise = 0, n_fall = 0, n_right = 0, n_up = 0, n_mismatch_orig = 0, n_ex_pass = 0;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    n_skip   += int'(mcu_skip);
    n_branch += int'(mcu_branch);
    n_ovf    += int'(mcu_stack_ovf);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ firmware
  localparam logic [6:0] PORTA = 7'h05, FSR = 7'h04, INDF = 7'h00;
  localparam logic [6:0] CSTAT = 7'h20, XCOUNT = 7'h21, FLAGB = 7'h22,
                         YCOUNT = 7'h23, PASS = 7'h24;
  logic [13:0] image [1024];

  // RA2 = XClock, RA3 = XData, RA0 = YClock, RA1 = YData
  // FLAGB bit 3 = RightFlag, bit 4 = UpFlag; CSTAT holds the last clock levels
  task automatic build_firmware(bit original);
    for (int i = 0; i < 1024; i++) image[i] = NOP();
    // clear 0x20..0x24 through FSR/INDF
    image[0]  = MOVLW(8'h20);
    image[1]  = MOVWF(FSR);
    image[2]  = MOVLW(8'd5);
    image[3]  = MOVWF(7'h2F);          // loop counter
    image[4]  = CLRF(INDF);            // clear: *FSR = 0
    image[5]  = INCF(FSR, 1);
    image[6]  = DECFSZ(7'h2F, 1);
    image[7]  = GOTO(11'd4);
    image[8]  = CALL(11'd11);          // MAIN: call BIT
    image[9]  = INCF(PASS, 1);         //       count passes
    image[10] = GOTO(11'd8);
    // BIT routine at 11
    // X: test XClock level
    image[11] = BTFSS(PORTA, 3'd2);    // XC = 1 ?
    image[12] = GOTO(11'd22);          // no: falling-edge section
    image[13] = BTFSC(CSTAT, 3'd2);    // rising edge if stored level is 0
    image[14] = GOTO(11'd30);
    image[15] = INCF(XCOUNT, 1);
    image[16] = BSF(CSTAT, 3'd2);
    image[17] = BCF(FLAGB, 3'd3);
    image[18] = original ? BTFSS(PORTA, 3'd3) : BTFSC(PORTA, 3'd3);
    image[19] = GOTO(11'd30);
    image[20] = BSF(FLAGB, 3'd3);      // right movement
    image[21] = GOTO(11'd30);
    image[22] = BTFSS(CSTAT, 3'd2);    // falling edge if stored level is 1
    image[23] = GOTO(11'd30);
    image[24] = INCF(XCOUNT, 1);
    image[25] = BCF(CSTAT, 3'd2);
    image[26] = BCF(FLAGB, 3'd3);
    image[27] = BTFSS(PORTA, 3'd3);
    image[28] = GOTO(11'd30);
    image[29] = BSF(FLAGB, 3'd3);
    // Y at 30
    image[30] = BTFSS(PORTA, 3'd0);
    image[31] = GOTO(11'd41);
    image[32] = BTFSC(CSTAT, 3'd0);
    image[33] = GOTO(11'd49);
    image[34] = INCF(YCOUNT, 1);
    image[35] = BSF(CSTAT, 3'd0);
    image[36] = BCF(FLAGB, 3'd4);
    image[37] = BTFSC(PORTA, 3'd1);
    image[38] = GOTO(11'd49);
    image[39] = BSF(FLAGB, 3'd4);      // up movement
    image[40] = GOTO(11'd49);
    image[41] = BTFSS(CSTAT, 3'd0);
    image[42] = GOTO(11'd49);
    image[43] = INCF(YCOUNT, 1);
    image[44] = BCF(CSTAT, 3'd0);
    image[45] = BCF(FLAGB, 3'd4);
    image[46] = BTFSS(PORTA, 3'd1);
    image[47] = GOTO(11'd49);
    image[48] = BSF(FLAGB, 3'd4);
    image[49] = RETURN();
  endtask

  task automatic program_and_reset();
    rst_n = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      prog_we = 1'b1; prog_addr = pc_t'(i); prog_wdata = image[i];
      @(negedge clk);
    end
    prog_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  function automatic byte_t ram(logic [6:0] a);
    return dut.u_mcu.u_ram.ram[a - 7'd12];
  endfunction

  task automatic wait_passes(int n);
    byte_t p0;
    p0 = ram(PASS);
    while (byte_t'(ram(PASS) - p0) < byte_t'(n)) @(negedge clk);
  endtask

  // one mouse session: `calls` pin changes; returns mismatches seen
  task automatic mouse_session(bit original, int calls, output int mism);
    logic xc = 0, yc = 0;
    mism = 0;
    build_firmware(original);
    porta_in = '0;
    program_and_reset();
    bit_clear = 1'b1; @(negedge clk); bit_clear = 1'b0;
    wait_passes(2);
    check(ram(XCOUNT) == 0 && ram(YCOUNT) == 0 && ram(FLAGB) == 0 && ram(CSTAT) == 0,
          "firmware cleared its variables");
    for (int c = 0; c < calls; c++) begin
      logic nxc, nyc;
      nxc = 1'($urandom); nyc = 1'($urandom);
      if (nxc && !xc) n_rise++;
      if (!nxc && xc) n_fall++;
      xc = nxc; yc = nyc;
      porta_in = {4'b0000, 1'($urandom), xc, 1'($urandom), yc};
      bit_start = 1'b1; @(negedge clk); bit_start = 1'b0;
      while (!bit_done) @(negedge clk);
      wait_passes(2);
      if (!original) begin
        check(ram(XCOUNT) == bit_xcount, $sformatf("XCOUNT %0d vs %0d", ram(XCOUNT), bit_xcount));
        check(ram(YCOUNT) == bit_ycount, $sformatf("YCOUNT %0d vs %0d", ram(YCOUNT), bit_ycount));
        check(ram(FLAGB)[3] == bit_rightflag, "RightFlag");
        check(ram(FLAGB)[4] == bit_upflag, "UpFlag");
        n_right += int'(bit_rightflag);
        n_up    += int'(bit_upflag);
      end else begin
        if (ram(FLAGB)[3] != bit_rightflag) mism++;
      end
    end
  endtask

  // ----------------------------------------- mouse controller reports
  // RD is sampled at each return of the Bit machine while the Trigger flag
  // is set; 45 samples are five frames of a 0 start bit and eight data bits.
  logic       mbits[$];
  logic [7:0] last_btn_byte = '0;
  int         n_mouse_reports = 0;
  always @(negedge clk) begin
    if (!rst_n) mbits.delete();
    else if (mouse_bit_tick) begin
      if (mouse_trigger) begin
        mbits.push_back(mouse_rd);
        if (mbits.size() == 45) begin
          for (int f = 0; f < 5; f++) check(mbits[9*f] == 1'b0, "mouse report start bit");
          for (int i = 0; i < 8; i++) last_btn_byte[i] = mbits[1 + i];
          check(last_btn_byte[7:3] == 5'b10000, "mouse report button byte marker");
          n_mouse_reports++;
          mbits.delete();
        end
      end else begin
        check(mouse_rd == 1'b1, "RD idle high");
      end
    end
  end

  // ----------------------------------------------------- example pair
  assign ex_spec_en = ex_impl_en && (ex_impl_pc inside {3'd1, 3'd2, 3'd4});

  task automatic example_runs(int n);
    for (int t = 0; t < n; t++) begin
      int guard = 0;
      ex_r1_init = 8'($urandom); ex_r2_init = 8'($urandom);
      ex_b1 = 3'($urandom); ex_b2 = 3'($urandom);
      ex_load = 1'b1; @(negedge clk); ex_load = 1'b0;
      ex_impl_en = 1'b1;
      while (!(ex_impl_halted && ex_spec_halted) && guard < 5000) begin
        @(negedge clk); guard++;
        if (ex_impl_pc == 3'd2) begin
          n_ex_pass++;
          check(ex_spec_s == 2'd1 && ex_spec_r1 == ex_impl_r1 && ex_spec_r2 == ex_impl_r2,
                "example machines agree at the bit test");
        end
      end
      @(negedge clk);
      ex_impl_en = 1'b0;
      @(negedge clk);
      check(ex_spec_r1 == ex_impl_r1 && ex_spec_r2 == ex_impl_r2 && !ex_spec_r2[ex_b2],
            "example machines agree when halted");
    end
  endtask

  initial begin
    int mism;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    example_runs(100);

    mouse_session(1'b0, 60, mism);
    mouse_session(1'b1, 60, mism);
    n_mismatch_orig = mism;
    check(mism > 0, "the BTFSS firmware disagrees with the Bit machine");

    // a button press must produce a report carrying it
    begin
      int r0, guard;
      r0 = n_mouse_reports; guard = 0;
      portb_in[2:0] = 3'b010;
      while (!(n_mouse_reports > r0 && last_btn_byte == 8'h82) && guard < 400_000) begin
        @(negedge clk); guard++;
      end
      check(last_btn_byte == 8'h82, $sformatf("button report %h", last_btn_byte));
    end

    // nine nested calls, then SLEEP
    for (int i = 0; i < 1024; i++) image[i] = NOP();
    for (int i = 0; i < 9; i++) image[i] = CALL(11'(i + 1));
    image[9] = SLEEP();
    program_and_reset();
    for (int i = 0; i < 400 && !mcu_sleeping; i++) @(negedge clk);
    n_sleep = int'(mcu_sleeping);
    check(mcu_sleeping && mcu_pc == 13'd10 && mcu_status[ST_PD] == 1'b0, "SLEEP reached");

    $display("skips=%0d branches=%0d stack_overflows=%0d sleeps=%0d", n_skip, n_branch, n_ovf, n_sleep);
    $display("xc_rise=%0d xc_fall=%0d right=%0d up=%0d original_fw_mismatches=%0d example_passes=%0d mouse_reports=%0d",
             n_rise, n_fall, n_right, n_up, n_mismatch_orig, n_ex_pass, n_mouse_reports);
    check(n_skip > 0,   "skip happened");
    check(n_branch > 0, "branch happened");
    check(n_ovf > 0,    "stack overflow happened");
    check(n_sleep > 0,  "sleep happened");
    check(n_rise > 0 && n_fall > 0, "both encoder edges happened");
    check(n_right > 0 && n_up > 0,  "right and up movements happened");
    check(n_ex_pass > 100, "example loops ran several passes");
    check(n_mouse_reports > 0, "mouse controller sent reports");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
