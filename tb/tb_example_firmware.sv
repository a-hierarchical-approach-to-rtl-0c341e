// tb_example_firmware: the example routine as real microcontroller code on
// the core, checked step by step against the example flowchart machine.
//
// The example program (decrement R1, set bit b2 of R2, leave the loop when
// bit b1 of R1 is 0, then clear bit b2 of R2) is assembled into the core's
// instruction set:
//   4 DECF  R1,1     5 BSF R2,b2     6 BTFSC R1,b1     7 GOTO 4
//   8 BCF   R2,b2    9 GOTO 9 (end)
// after a prologue (0..3) that loads the random starting values of R1
// (address 0x0C) and R2 (0x0D).  It runs on the core in the top, and the
// flowchart machine example_spec, loaded with the same values, is
// synchronised to it through the program counter: whenever the core is about
// to execute instruction 6 (the bit test), 4 (a new pass), 8 (loop left) or
// 9 (the end), the flowchart machine takes one step (S0 -> S1, S1 -> S0,
// S1 -> S2, and the clearing of the bit in S2), and its state, R1 and R2 must
// then equal the expected state and the contents of the core's registers.  This
// is the two-level check of the design: the core is trusted to execute its
// instructions (its own testbench), and the program built from them must
// behave like the flowchart.  The clock count of a pass (five instruction
// cycles of eight clocks, the GOTO taking two) is checked too.  The
// program layout and the register addresses are this testbench's own.
module tb_example_firmware;
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
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endfunction

  localparam logic [6:0] R1 = 7'h0C, R2 = 7'h0D;

  function automatic byte_t ram(logic [6:0] a);
    return dut.u_mcu.u_ram.ram[6'(a - 7'd12)];
  endfunction

  task automatic load_and_run(byte_t r1, byte_t r2, logic [2:0] b1, logic [2:0] b2);
    logic [13:0] image [1024];
    for (int i = 0; i < 1024; i++) image[i] = GOTO(11'd9);
    image[0] = MOVLW(r1);  image[1] = MOVWF(R1);
    image[2] = MOVLW(r2);  image[3] = MOVWF(R2);
    image[4] = DECF(R1, 1'b1);
    image[5] = BSF(R2, b2);
    image[6] = BTFSC(R1, b1);
    image[7] = GOTO(11'd4);
    image[8] = BCF(R2, b2);
    image[9] = GOTO(11'd9);
    rst_n = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      prog_we = 1'b1; prog_addr = pc_t'(i); prog_wdata = image[i];
      @(negedge clk);
    end
    prog_we = 1'b0;
    ex_r1_init = r1; ex_r2_init = r2; ex_b1 = b1; ex_b2 = b2;
    @(negedge clk);
    rst_n = 1'b1;
    ex_load = 1'b1;
    @(negedge clk);
    ex_load = 1'b0;
  endtask

  task automatic spec_step();
    ex_spec_en = 1'b1;
    @(negedge clk);
    ex_spec_en = 1'b0;
  endtask

  int n_runs = 0, n_passes = 0, n_exit_on_first = 0, n_long = 0;

  initial begin
    for (int run = 0; run < 80; run++) begin
      byte_t r1, r2;
      logic [2:0] b1, b2;
      int passes, t, t_pass, guard, expect_passes;
      bit first, finished;
      passes = 0; t = 0; t_pass = -1; guard = 0; first = 1'b1; finished = 1'b0;
      r1 = (run < 4) ? byte_t'(run) : byte_t'($urandom);
      r2 = byte_t'($urandom);
      b1 = 3'($urandom); b2 = 3'($urandom);
      load_and_run(r1, r2, b1, b2);
      while (!finished && guard < 200_000) begin
        @(negedge clk);
        t++; guard++;
        if (mcu_ready) begin
          int t_ready;
          t_ready = t;
          unique case (mcu_pc)
            13'd4: begin
              if (first) begin
                check(ex_spec_s == 2'd0 && ex_spec_r1 == ram(R1) && ex_spec_r2 == ram(R2),
                      "flowchart starts in S0 with the loaded registers");
                first = 1'b0;
              end else begin
                spec_step();
                check(ex_spec_s == 2'd0, "bit set: flowchart back in S0");
                check(t_ready - t_pass == 40, $sformatf("a pass takes 40 clocks, took %0d", t_ready - t_pass));
                t += 1;
              end
              t_pass = t_ready;
            end
            13'd6: begin
              spec_step();
              passes++;
              check(ex_spec_s == 2'd1, "flowchart at the bit test");
              check(ex_spec_r1 == ram(R1) && ex_spec_r2 == ram(R2),
                    $sformatf("R1/R2 at the bit test: core %h/%h flowchart %h/%h",
                              ram(R1), ram(R2), ex_spec_r1, ex_spec_r2));
              t += 1;
            end
            13'd8: begin
              spec_step();
              check(ex_spec_halted, "bit clear: flowchart in S2");
              t += 1;
            end
            13'd9: begin
              spec_step();
              check(ex_spec_halted, "flowchart stays in S2");
              check(ex_spec_r1 == ram(R1) && ex_spec_r2 == ram(R2) && !ram(R2)[b2],
                    $sformatf("R1/R2 at the end: core %h/%h flowchart %h/%h (b2=%0d)", ram(R1), ram(R2), ex_spec_r1, ex_spec_r2, b2));
              finished = 1'b1;
            end
            default: ;
          endcase
        end
      end
      check(finished, "program reached its end");
      // independent count: passes until bit b1 of R1 - passes is 0
      begin
        expect_passes = 1;
        while ((((r1 - byte_t'(expect_passes)) >> b1) & 8'd1) != 8'd0) expect_passes++;
        check(passes == expect_passes,
              $sformatf("passes %0d expected %0d (R1=%h b1=%0d)", passes, expect_passes, r1, b1));
      end
      n_runs++;
      n_passes += passes;
      if (passes == 1) n_exit_on_first++;
      if (passes > 1) n_long++;
    end
    check(n_exit_on_first > 0 && n_long > 0, "both loop exits on the first pass and loops of several passes");
    $display("runs=%0d passes=%0d single_pass=%0d multi_pass=%0d", n_runs, n_passes, n_exit_on_first, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
