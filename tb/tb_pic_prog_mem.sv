// tb_pic_prog_mem: program memory write port and asynchronous read.
//
// Fills all 1024 words with a pattern computed from the address, reads every
// word back, overwrites a random subset, and checks that addresses above
// the memory size wrap to the low address bits.
module tb_pic_prog_mem;
  import pic_pkg::*;

  localparam int unsigned WORDS = 1024;

  logic   clk = 1'b0;
  pc_t    addr = '0, prog_addr = '0;
  instr_t rdata, prog_wdata = '0;
  logic   prog_we = 1'b0;

  pic_prog_mem dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t pattern(int a, int salt);
    return instr_t'((a * 37 + salt * 1013 + 5) % 16384);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    instr_t shadow [WORDS];
    @(negedge clk);
    for (int a = 0; a < WORDS; a++) begin
      prog_we = 1'b1; prog_addr = pc_t'(a); prog_wdata = pattern(a, 0);
      shadow[a] = prog_wdata;
      @(negedge clk);
    end
    prog_we = 1'b0;
    for (int a = 0; a < WORDS; a++) begin
      addr = pc_t'(a); #1;
      check(rdata == pattern(a, 0), $sformatf("word %0d", a));
    end
    for (int i = 0; i < 300; i++) begin
      int a = $urandom_range(0, WORDS - 1);
      prog_we = 1'b1; prog_addr = pc_t'(a); prog_wdata = pattern(a, i + 1);
      shadow[a] = prog_wdata;
      @(negedge clk);
    end
    prog_we = 1'b0;
    for (int i = 0; i < 500; i++) begin
      int a = $urandom_range(0, 8191);
      addr = pc_t'(a); #1;
      check(rdata == shadow[a % WORDS], $sformatf("read %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
