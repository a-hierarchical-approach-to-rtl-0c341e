// tb_pic_alu: exhaustive-by-sampling check of the ALU.
//
// For every operation, random operands, carry-in and bit numbers are applied
// and the result and flags are compared with values computed here from the
// definitions: C of an addition is bit 8 of the 9-bit sum, C of a subtraction
// is 1 when no borrow occurs (a >= w), DC is the same for the low nibble,
// Z is result == 0 (for a bit test: the selected bit is 0).  Flags that an
// operation does not produce must pass C through unchanged.
module tb_pic_alu;
  import pic_pkg::*;

  alu_op_e    op;
  byte_t      a, w, result;
  logic [2:0] bsel;
  logic       c_in, c_out, dc_out, z_out;

  pic_alu dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s op=%s a=%h w=%h b=%0d c=%b: got %h exp %h",
                                  what, op.name(), a, w, bsel, c_in, got, exp);
    end
  endtask

  initial begin
    logic [7:0] er;
    logic       ec, edc, ez;
    for (int i = 0; i < 4000; i++) begin
      op   = alu_op_e'($urandom_range(0, 16));
      a    = 8'($urandom);
      w    = 8'($urandom);
      bsel = 3'($urandom);
      c_in = 1'($urandom);
      if (i < 16) begin a = 8'h00; w = 8'h00; end
      if (i >= 16 && i < 32) begin a = 8'hFF; w = 8'h01; end
      #1;
      ec = c_in; edc = 1'b0;
      case (op)
        ALU_PASS_A: er = a;
        ALU_PASS_W: er = w;
        ALU_CLR:    er = 0;
        ALU_ADD: begin er = a + w; ec = (int'(a) + int'(w)) > 255; edc = (int'(a % 16) + int'(w % 16)) > 15; end
        ALU_SUB: begin er = a - w; ec = a >= w; edc = (a % 16) >= (w % 16); end
        ALU_AND:  er = a & w;
        ALU_IOR:  er = a | w;
        ALU_XOR:  er = a ^ w;
        ALU_COM:  er = 8'hFF - a;
        ALU_INC:  er = 8'((int'(a) + 1) % 256);
        ALU_DEC:  er = 8'((int'(a) + 255) % 256);
        ALU_RLF: begin er = 8'((int'(a) * 2) % 256 + int'(c_in)); ec = a >= 128; end
        ALU_RRF: begin er = 8'(int'(a) / 2 + 128 * int'(c_in)); ec = a[0]; end
        ALU_SWAP: er = 8'((int'(a) % 16) * 16 + int'(a) / 16);
        ALU_BCF: begin er = a; er[bsel] = 1'b0; end
        ALU_BSF: begin er = a; er[bsel] = 1'b1; end
        default:  er = a;
      endcase
      ez = (op == ALU_BTEST) ? (a[bsel] == 1'b0) : (er == 0);
      expect_eq(result, er, "result");
      expect_eq({7'd0, c_out}, {7'd0, ec}, "carry");
      if (op inside {ALU_ADD, ALU_SUB}) expect_eq({7'd0, dc_out}, {7'd0, edc}, "digit carry");
      expect_eq({7'd0, z_out}, {7'd0, ez}, "zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
