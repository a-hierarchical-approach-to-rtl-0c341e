// tb_pic_pc_stack: program counter and 8-level stack.
//
// Random sequences of increment, load, load-with-push (CALL) and pop
// (RETURN) are applied; a queue-based reference tracks the expected PC and
// stack.  The reference keeps only the last eight pushes, so after a ninth
// push the oldest return address is lost, and the ovf/unf pulses are
// checked against its own count of stack entries.
module tb_pic_pc_stack;
  import pic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic inc = 1'b0, load = 1'b0, push = 1'b0, pop = 1'b0;
  pc_t  load_val = '0, pc;
  logic [3:0] depth;
  logic ovf, unf;

  pic_pc_stack dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0;

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
    pc_t exp_pc;
    pc_t q[$];
    int  cnt;                 // entries in use, saturating at 8
    bit  e_ovf, e_unf, known;
    exp_pc = 0; cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(pc == 0 && depth == 0, "reset");
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      inc = 0; load = 0; push = 0; pop = 0; load_val = 13'($urandom);
      e_ovf = 0; e_unf = 0; known = 1;
      if (r < 40) begin
        inc = 1; exp_pc = exp_pc + 1;
      end else if (r < 55) begin
        load = 1; exp_pc = load_val;
      end else if (r < 78 - (i > 1500 ? 10 : 0)) begin
        load = 1; push = 1;
        q.push_back(exp_pc);
        if (q.size() > 8) void'(q.pop_front());
        if (cnt == 8) e_ovf = 1; else cnt++;
        exp_pc = load_val;
      end else begin
        pop = 1;
        if (cnt == 0) e_unf = 1; else cnt--;
        if (q.size() > 0) exp_pc = q.pop_back();
        else known = 0;       // stale entry: value not checked
      end
      @(negedge clk);
      if (known) check(pc == exp_pc, $sformatf("pc %h exp %h at %0d", pc, exp_pc, i));
      else exp_pc = pc;
      check(ovf == e_ovf && unf == e_unf, $sformatf("ovf/unf %b%b exp %b%b", ovf, unf, e_ovf, e_unf));
      check(depth == 4'(cnt), "depth");
      n_ovf += ovf; n_unf += unf;
      // after an underflow the circular buffer no longer lines up with the
      // queue; restart the reference from an empty stack
      if (e_unf) begin q.delete(); end
    end
    check(n_ovf > 0, "overflow seen");
    check(n_unf > 0, "underflow seen");
    $display("overflows=%0d underflows=%0d", n_ovf, n_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
