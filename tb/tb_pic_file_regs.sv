// tb_pic_file_regs: the 36 general purpose registers.
//
// Checks the address decode (hit only for 0x0C..0x2F in either bank, with
// any value of the upper address bits), that writes outside that range or
// without `we` change nothing, and random write/read traffic against a
// reference array.
module tb_pic_file_regs;
  import pic_pkg::*;

  logic       clk = 1'b0;
  logic [8:0] addr = '0;
  logic       we = 1'b0;
  byte_t      wdata = '0, rdata;
  logic       hit;

  pic_file_regs dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    byte_t ref_mem [36];
    @(negedge clk);
    for (int a = 0; a < 512; a++) begin
      addr = 9'(a); #1;
      check(hit == ((a % 128) >= 12 && (a % 128) < 48), $sformatf("hit at %h", a));
    end
    for (int i = 0; i < 36; i++) begin
      addr = 9'(12 + i); we = 1'b1; wdata = 8'(i * 7 + 3);
      ref_mem[i] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      int a = $urandom_range(0, 511);
      int idx = (a % 128) - 12;
      bit in_range = (a % 128) >= 12 && (a % 128) < 48;
      addr = 9'(a);
      we = 1'($urandom);
      wdata = 8'($urandom);
      #1;
      if (in_range) check(rdata == ref_mem[idx], $sformatf("read %h", a));
      else          check(rdata == 8'h00, $sformatf("read outside %h", a));
      if (we && in_range) ref_mem[idx] = wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
