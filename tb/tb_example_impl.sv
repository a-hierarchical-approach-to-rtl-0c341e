// tb_example_impl: the five-instruction example program machine.
//
// For random initial R1/R2 and bit numbers b1/b2 the loop "decrement R1 and
// set bit b2 of R2, until bit b1 of R1 is 0, then clear bit b2 of R2" is
// worked out here; the machine must halt after the predicted number of
// clocks (4 per loop pass, 3 in the last pass) with the predicted R1
// and R2.  While running, bit b2 of R2 must be 1 after each pass; once
// halted it must be 0.  A pause of `en` must freeze the machine.
module tb_example_impl;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       en = 1'b0, load = 1'b0;
  logic [7:0] r1_init = '0, r2_init = '0, r1, r2;
  logic [2:0] b1 = '0, b2 = '0;
  logic [2:0] pc;
  logic       halted;

  example_impl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      logic [7:0] e1, e2;
      int passes, clocks, expect_clocks;
      r1_init = 8'($urandom); r2_init = 8'($urandom);
      b1 = 3'($urandom); b2 = 3'($urandom);
      // reference
      e1 = r1_init; e2 = r2_init; passes = 0;
      do begin
        e1 = e1 - 8'd1; e2[b2] = 1'b1; passes++;
      end while (e1[b1] == 1'b1);
      e2[b2] = 1'b0;
      expect_clocks = 4 * (passes - 1) + 3;
      load = 1'b1; @(negedge clk); load = 1'b0;
      check(r1 == r1_init && r2 == r2_init && pc == 0, "load");
      en = 1'b1;
      clocks = 0;
      while (!halted && clocks < 5000) begin
        @(negedge clk); clocks++;
        if (pc == 0 && !halted) check(r2[b2] == 1'b1 || clocks == 0, "bit b2 set while looping");
        if (t % 10 == 0 && clocks == 1) begin
          logic [7:0] h1, h2;
          h1 = r1; h2 = r2;
          en = 1'b0; repeat (3) @(negedge clk); en = 1'b1;
          check(r1 == h1 && r2 == h2, "en low freezes the machine");
        end
      end
      check(clocks == expect_clocks, $sformatf("halted after %0d clocks, expected %0d", clocks, expect_clocks));
      @(negedge clk);
      check(r1 == e1, $sformatf("R1 %h expected %h", r1, e1));
      check(r2 == e2, $sformatf("R2 %h expected %h", r2, e2));
      check(halted && r2[b2] == 1'b0, "halted with bit b2 of R2 clear");
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
