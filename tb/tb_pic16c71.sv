// tb_pic16c71: self-checking test of the microcontroller core.
//
// The core is compared with an instruction-set level model (pic_tb_pkg) at
// the start of every instruction cycle that executes (`ready`): PC, W,
// STATUS and all 36 general purpose registers must agree, and the number of
// clocks since the previous instruction must be 8 for a one-cycle and 16 for
// a two-cycle instruction.  Three runs:
//   1. a directed program with a counted loop (DECFSZ), a CALL/RETLW table
//      lookup, indirect addressing through FSR/INDF, a computed jump via
//      PCL, port output, eight nested CALLs and SLEEP;
//      its final results are also checked against hand-worked values;
//   2. and 3. random programs over the whole instruction set (no SLEEP),
//      with random port inputs;
//   4. nine nested CALLs, which overflow the 8-level stack.
module tb_pic16c71;
  import pic_pkg::*;
  import pic_tb_pkg::*;

  localparam int unsigned WORDS = 1024;
  localparam int unsigned GPRS  = 36;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   prog_we;
  pc_t    prog_addr;
  instr_t prog_wdata;
  byte_t  porta_in, portb_in, porta_out, porta_oe, portb_out, portb_oe;
  logic   ready, sleeping, skip_taken, branch, stack_ovf;
  pc_t    pc;
  byte_t  w, status;

  pic16c71 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_skip = 0, n_branch = 0, n_ovf = 0;
  pic_isa_model m;
  logic [13:0] image [WORDS];

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (skip_taken) n_skip++;
    if (branch)     n_branch++;
    if (stack_ovf)  n_ovf++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic load_and_reset();
    rst_n   = 1'b0;
    prog_we = 1'b0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      prog_we = 1'b1; prog_addr = pc_t'(i); prog_wdata = image[i];
      m.prog[i] = image[i];
      @(negedge clk);
    end
    prog_we = 1'b0;
    m.reset();
    @(negedge clk);
    rst_n = 1'b1;
    // RAM and stack contents are not reset: start the model from the same
    for (int i = 0; i < GPRS; i++) m.gpr[i] = dut.u_ram.ram[i];
    for (int i = 0; i < 8; i++)    m.stack[i] = dut.u_pc.stack[i];
  endtask

  function automatic bit state_matches(output string msg);
    msg = $sformatf("pc %h/%h w %h/%h status %h/%h", pc, m.pc, w, m.w, status, m.status);
    if (pc !== m.pc || w !== m.w || status !== m.status) return 0;
    for (int i = 0; i < GPRS; i++)
      if (dut.u_ram.ram[i] !== m.gpr[i]) begin
        msg = $sformatf("gpr %0d %h/%h", i, dut.u_ram.ram[i], m.gpr[i]);
        return 0;
      end
    return 1;
  endfunction

  // Run until `n` instructions executed or the core sleeps.
  task automatic run(int n, bit random_ports);
    int last_t = -1, expect_clks = 0, t = 0, done = 0;
    string msg;
    while (done < n) begin
      if (t > 0) @(negedge clk);
      t++;
      if (sleeping) begin
        check(m.asleep, "core sleeps, model does not");
        break;
      end
      if (ready) begin
        check(state_matches(msg), $sformatf("state after %0d instr: %s", done, msg));
        if (last_t >= 0) check(t - last_t == expect_clks,
                               $sformatf("cycle count %0d expected %0d", t - last_t, expect_clks));
        last_t = t;
        if (random_ports && ($urandom_range(0, 7) == 0)) begin
          porta_in = 8'($urandom); portb_in = 8'($urandom);
        end
        m.porta_in = porta_in; m.portb_in = portb_in;
        expect_clks = 8 * m.step();
        done++;
      end
    end
  endtask

  function automatic logic [6:0] rand_f();
    int r = $urandom_range(0, 99);
    if (r < 55) return 7'($urandom_range(12, 47));
    if (r < 62) return 7'h00;
    if (r < 70) return 7'h04;
    if (r < 76) return 7'h03;
    if (r < 82) return 7'h05;
    if (r < 86) return 7'h06;
    if (r < 88) return 7'h02;
    if (r < 90) return 7'h0A;
    return 7'($urandom_range(0, 127));
  endfunction

  function automatic logic [13:0] rand_instr();
    int r = $urandom_range(0, 99);
    logic [13:0] x;
    if (r < 45) begin
      do x = {2'b00, 4'($urandom), 1'($urandom), rand_f()};
      while (x[11:8] == 4'b0000 && x[7] == 1'b0);          // no SLEEP / RETURN here
      return x;
    end
    if (r < 65) return {2'b01, 2'($urandom), 3'($urandom), rand_f()};
    if (r < 85) return {2'b11, 4'($urandom), 8'($urandom)};
    if (r < 90) return GOTO(11'($urandom_range(0, WORDS - 1)));
    if (r < 94) return CALL(11'($urandom_range(0, WORDS - 1)));
    if (r < 97) return RETURN();
    if (r < 98) return RETFIE();
    return NOP();
  endfunction

  initial begin
    string msg;
    m = new(WORDS, 12, GPRS);
    porta_in = 8'hA5; portb_in = 8'h3C;
    prog_addr = '0; prog_wdata = '0;

    // ------------------------------------------------ directed program
    for (int i = 0; i < WORDS; i++) image[i] = NOP();
    begin
      int a = 0;
      // W = 5 + ... : sum 1..10 into 0x20 with a DECFSZ loop
      image[a++] = MOVLW(8'd10);      // 0
      image[a++] = MOVWF(7'h21);      // 1 counter
      image[a++] = CLRF(7'h20);       // 2 sum
      image[a++] = MOVF(7'h21, 0);    // 3 loop: W = counter
      image[a++] = ADDWF(7'h20, 1);   // 4 sum += W
      image[a++] = DECFSZ(7'h21, 1);  // 5
      image[a++] = GOTO(11'd3);       // 6
      // table lookup: W = table[2] via CALL/RETLW with computed jump
      image[a++] = MOVLW(8'd2);       // 7
      image[a++] = CALL(11'd100);     // 8
      image[a++] = MOVWF(7'h22);      // 9 -> 0x33
      // indirect: write 0x5A to 0x30.. via FSR = 0x25
      image[a++] = MOVLW(8'h25);      // 10
      image[a++] = MOVWF(7'h04);      // 11 FSR
      image[a++] = MOVLW(8'h5A);      // 12
      image[a++] = MOVWF(7'h00);      // 13 INDF -> 0x25
      image[a++] = INCF(7'h04, 1);    // 14 FSR++
      image[a++] = COMF(7'h00, 1);    // 15 ~[0x26]
      // ports: bank 1, TRISB = 0; bank 0, PORTB = 0xC3
      image[a++] = BSF(7'h03, 3'd5);  // 16 RP0 = 1
      image[a++] = CLRF(7'h06);       // 17 TRISB = 0
      image[a++] = BCF(7'h03, 3'd5);  // 18 RP0 = 0
      image[a++] = MOVLW(8'hC3);      // 19
      image[a++] = MOVWF(7'h06);      // 20 PORTB
      image[a++] = MOVF(7'h05, 0);    // 21 W = PORTA pins
      image[a++] = MOVWF(7'h23);      // 22
      // eight nested calls (all stack levels): 23 -> 200 -> 202 ... -> 214
      image[a++] = CALL(11'd200);     // 23
      image[a++] = SUBLW(8'd3);       // 24 W = 3 - W
      image[a++] = MOVWF(7'h24);      // 25
      image[a++] = SLEEP();           // 26
      // table at 100: ADDWF PCL ; RETLW 0x11, 0x22, 0x33
      image[100] = ADDWF(7'h02, 1);
      image[101] = RETLW(8'h11);
      image[102] = RETLW(8'h22);
      image[103] = RETLW(8'h33);
      for (int i = 0; i < 7; i++) begin
        image[200 + 2*i] = CALL(11'(202 + 2*i));
        image[201 + 2*i] = RETURN();
      end
      image[214] = RETLW(8'd1);
    end
    load_and_reset();
    run(400, 1'b0);
    check(sleeping === 1'b1, "directed program reaches SLEEP");
    check(dut.u_ram.ram[8'h20 - 12] == 8'd55, "sum 1..10 = 55");
    check(dut.u_ram.ram[8'h22 - 12] == 8'h33, "table lookup");
    check(dut.u_ram.ram[8'h25 - 12] == 8'h5A, "indirect write");
    check(portb_out == 8'hC3 && portb_oe == 8'hFF, "port B output");
    check(dut.u_ram.ram[8'h23 - 12] == 8'hA5, "port A read");
    check(status[ST_PD] == 1'b0, "PD cleared by SLEEP");
    check(dut.u_ram.ram[8'h24 - 12] == 8'd2, "eight nested calls return");

    // ------------------------------------------------ random programs
    for (int run_i = 0; run_i < 2; run_i++) begin
      for (int i = 0; i < WORDS; i++) image[i] = rand_instr();
      porta_in = 8'($urandom); portb_in = 8'($urandom);
      load_and_reset();
      run(3000, 1'b1);
    end

    // nine nested calls: the ninth push overwrites the oldest return address
    for (int i = 0; i < WORDS; i++) image[i] = NOP();
    for (int i = 0; i < 9; i++) image[i] = CALL(11'(i + 1));
    image[9]  = RETURN();
    image[10] = SLEEP();
    load_and_reset();
    n_ovf = 0;
    run(40, 1'b0);
    check(n_ovf == 1, "one stack overflow from nine nested calls");

    check(n_skip > 0,   "skips taken");
    check(n_branch > 0, "branches taken");
    check(n_ovf > 0,    "stack wrap-around seen");
    $display("skips=%0d branches=%0d stack_overflows=%0d", n_skip, n_branch, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
