// tb_mouse_byte_spec: the serial byte sender (Byte routine).
//
// The Bit routine is replaced by a responder that answers each call after a
// random number of clocks.  RD is sampled at every call: with the Trigger
// flag set the nine samples must be the start bit 0 and the data byte,
// least significant bit first; with it clear all nine must be 1.  The
// number of clocks from `start` to `done` is checked against the state
// walk: 62 clocks plus the responder's delays with the flag set (S1, S2,
// S3, the start-bit call, then eight times S5, S6, S7, S8|S9, the call,
// S11), 37 plus the delays with it clear (S1, S2, the call, then eight
// times S5, the call, S11); each call costs two clocks plus its delay.
module tb_mouse_byte_spec;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start = 1'b0, trigger = 1'b0, bit_done = 1'b0;
  logic [7:0] data = '0;
  logic       rd, busy, done, bit_start;

  mouse_byte_spec dut (.*);

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

  // Bit routine stand-in: RD is recorded when the call is made
  logic samples[$];
  int   delay_sum = 0;
  always @(negedge clk) begin
    if (bit_start) begin
      int l;
      samples.push_back(rd);
      l = $urandom_range(0, 6);
      delay_sum += l;
      repeat (l) @(negedge clk);
      bit_done = 1'b1;
      @(negedge clk);
      bit_done = 1'b0;
    end
  end

  initial begin
    int clocks, n_on = 0, n_off = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(rd == 1'b1, "RD high after reset");
    for (int n = 0; n < 400; n++) begin
      logic [7:0] d;
      bit         trg;
      d = 8'($urandom);
      trg = ($urandom_range(0, 2) != 0);
      if (n < 4) trg = n[0];
      samples.delete();
      delay_sum = 0;
      data = d; trigger = trg; start = 1'b1;
      @(negedge clk);
      start = 1'b0; data = 8'($urandom);   // the byte is taken at start
      clocks = 1;
      while (!done) begin @(negedge clk); clocks++; end
      check(samples.size() == 9, $sformatf("byte %0d: %0d Bit calls", n, samples.size()));
      if (samples.size() == 9) begin
        if (trg) begin
          n_on++;
          check(samples[0] == 1'b0, "start bit is 0");
          for (int i = 0; i < 8; i++)
            check(samples[i+1] == d[i], $sformatf("byte %0d data bit %0d", n, i));
        end else begin
          n_off++;
          foreach (samples[i]) check(samples[i] == 1'b1, "RD high with trigger clear");
        end
      end
      check(clocks == (trg ? 62 : 37) + delay_sum,
            $sformatf("byte %0d trigger %0d took %0d clocks, expected %0d",
                      n, trg, clocks, (trg ? 62 : 37) + delay_sum));
      check(!busy, "idle after done");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    check(n_on > 0 && n_off > 0, "both trigger cases seen");
    $display("bytes sent=%0d bytes suppressed=%0d", n_on, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
