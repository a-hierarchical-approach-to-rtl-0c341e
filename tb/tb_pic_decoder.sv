// tb_pic_decoder: checks the decoder against the instruction table.
//
// Each of the 35 instructions is encoded by the test's own assembler with
// random operands, and the decoded destination, operand source, flag set and
// program-flow class are compared with a table written out here from the
// instruction descriptions.  Operand fields f, b, k8, k11 are checked
// against the bit positions of the four instruction formats.
module tb_pic_decoder;
  import pic_pkg::*;
  import pic_tb_pkg::*;

  instr_t      instr;
  ctrl_t       ctrl;
  logic [6:0]  f;
  logic [2:0]  b;
  byte_t       k8;
  logic [10:0] k11;

  pic_decoder dut (.instr, .ctrl, .f, .b, .k8, .k11);

  int checks = 0, failures = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {wr_w, wr_f, use_lit, upd_z, upd_c, upd_dc}, flow
  task automatic chk(string name, logic [13:0] word, logic [5:0] exp_bits, flow_e exp_flow);
    instr = word;
    #1;
    checks++;
    if ({ctrl.wr_w, ctrl.wr_f, ctrl.use_lit, ctrl.upd_z, ctrl.upd_c, ctrl.upd_dc} !== exp_bits ||
        ctrl.flow !== exp_flow || ctrl.illegal !== 1'b0) begin
      failures++;
      $display("FAIL %s %b: got %b %s exp %b %s", name, word,
               {ctrl.wr_w, ctrl.wr_f, ctrl.use_lit, ctrl.upd_z, ctrl.upd_c, ctrl.upd_dc},
               ctrl.flow.name(), exp_bits, exp_flow.name());
    end
    checks++;
    if (f !== word[6:0] || b !== word[9:7] || k8 !== word[7:0] || k11 !== word[10:0]) begin
      failures++;
      $display("FAIL %s operand fields", name);
    end
  endtask

  initial begin
    for (int i = 0; i < 50; i++) begin
      logic [6:0] rf;
      logic       d;
      logic [2:0] rb;
      logic [7:0] rk;
      logic [5:0] dst;
      rf = 7'($urandom); d = 1'($urandom); rb = 3'($urandom); rk = 8'($urandom);
      dst = d ? 6'b010000 : 6'b100000;
      chk("ADDWF",  ADDWF(rf, d),  dst | 6'b000111, FLOW_NONE);
      chk("ANDWF",  ANDWF(rf, d),  dst | 6'b000100, FLOW_NONE);
      chk("CLRF",   CLRF(rf),      6'b010100,       FLOW_NONE);
      chk("CLRW",   CLRW(),        6'b100100,       FLOW_NONE);
      chk("COMF",   COMF(rf, d),   dst | 6'b000100, FLOW_NONE);
      chk("DECF",   DECF(rf, d),   dst | 6'b000100, FLOW_NONE);
      chk("DECFSZ", DECFSZ(rf, d), dst,             FLOW_SKIPZ);
      chk("INCF",   INCF(rf, d),   dst | 6'b000100, FLOW_NONE);
      chk("INCFSZ", INCFSZ(rf, d), dst,             FLOW_SKIPZ);
      chk("IORWF",  IORWF(rf, d),  dst | 6'b000100, FLOW_NONE);
      chk("MOVF",   MOVF(rf, d),   dst | 6'b000100, FLOW_NONE);
      chk("MOVWF",  MOVWF(rf),     6'b010000,       FLOW_NONE);
      chk("NOP",    NOP(),         6'b000000,       FLOW_NONE);
      chk("RLF",    RLF(rf, d),    dst | 6'b000010, FLOW_NONE);
      chk("RRF",    RRF(rf, d),    dst | 6'b000010, FLOW_NONE);
      chk("SUBWF",  SUBWF(rf, d),  dst | 6'b000111, FLOW_NONE);
      chk("SWAPF",  SWAPF(rf, d),  dst,             FLOW_NONE);
      chk("XORWF",  XORWF(rf, d),  dst | 6'b000100, FLOW_NONE);
      chk("BCF",    BCF(rf, rb),   6'b010000,       FLOW_NONE);
      chk("BSF",    BSF(rf, rb),   6'b010000,       FLOW_NONE);
      chk("BTFSC",  BTFSC(rf, rb), 6'b000000,       FLOW_SKIPZ);
      chk("BTFSS",  BTFSS(rf, rb), 6'b000000,       FLOW_SKIPNZ);
      chk("ADDLW",  ADDLW(rk),     6'b101111,       FLOW_NONE);
      chk("ANDLW",  ANDLW(rk),     6'b101100,       FLOW_NONE);
      chk("CALL",   CALL(11'($urandom)), 6'b000000, FLOW_CALL);
      chk("CLRWDT", CLRWDT(),      6'b000000,       FLOW_NONE);
      chk("GOTO",   GOTO(11'($urandom)), 6'b000000, FLOW_GOTO);
      chk("IORLW",  IORLW(rk),     6'b101100,       FLOW_NONE);
      chk("MOVLW",  MOVLW(rk),     6'b101000,       FLOW_NONE);
      chk("RETFIE", RETFIE(),      6'b000000,       FLOW_RETFIE);
      chk("RETLW",  RETLW(rk),     6'b101000,       FLOW_RETLW);
      chk("RETURN", RETURN(),      6'b000000,       FLOW_RETURN);
      chk("SLEEP",  SLEEP(),       6'b000000,       FLOW_SLEEP);
      chk("SUBLW",  SUBLW(rk),     6'b101111,       FLOW_NONE);
      chk("XORLW",  XORLW(rk),     6'b101100,       FLOW_NONE);
    end
    // ALU operation of a few representative words
    instr = SUBWF(7'h20, 1'b1); #1; checks++; if (ctrl.alu_op !== ALU_SUB)   failures++;
    instr = SWAPF(7'h20, 1'b0); #1; checks++; if (ctrl.alu_op !== ALU_SWAP)  failures++;
    instr = BTFSS(7'h05, 3'd2); #1; checks++; if (ctrl.alu_op !== ALU_BTEST) failures++;
    instr = RLF(7'h20, 1'b1);   #1; checks++; if (ctrl.alu_op !== ALU_RLF)   failures++;
    instr = 14'b11_1011_0000_0000; #1; checks++; if (ctrl.illegal !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
