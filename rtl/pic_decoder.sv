// pic_decoder: instruction decoder of the microcontroller.
//
// Combinational.  Splits a 14-bit instruction word into the four formats of
// the instruction set (byte-oriented, bit-oriented, literal, CALL/GOTO) and
// produces a ctrl_t: the ALU operation, whether operand A is the literal,
// where the result goes (W or file register, from the d bit), which STATUS
// flags are written, and the program-flow class (skip, goto, call, returns,
// sleep).  The operand fields are exposed separately: f (7 bits), b (3 bits),
// k8 (8 bits) and k11 (11 bits).
//
// The opcodes, formats and the set of 35 instructions are the documented
// instruction set.  Which flags each instruction affects, and the choice to
// run an unknown word as a NOP, are taken from the PIC family.  RETFIE is
// accepted both with the encoding 00 0000 0110 1001 and 00 0000 0000 1001.
// CLRWDT runs as a NOP since no watchdog timer is part of this design.
module pic_decoder
  import pic_pkg::*;
(
  input  instr_t      instr,
  output ctrl_t       ctrl,
  output logic [6:0]  f,
  output logic [2:0]  b,
  output byte_t       k8,
  output logic [10:0] k11
);

  logic d;

  assign f   = instr[6:0];
  assign b   = instr[9:7];
  assign k8  = instr[7:0];
  assign k11 = instr[10:0];
  assign d   = instr[7];

  // byte-oriented: result to f when d = 1, else to W
  function automatic ctrl_t byte_op(alu_op_e op, logic dd, logic z, logic c, logic dc, flow_e fl);
    ctrl_t r;
    r = '{alu_op: op, use_lit: 1'b0, rd_f: 1'b1, wr_w: ~dd, wr_f: dd,
          upd_z: z, upd_c: c, upd_dc: dc, flow: fl, illegal: 1'b0};
    return r;
  endfunction

  function automatic ctrl_t lit_op(alu_op_e op, logic z, logic c, logic dc, flow_e fl);
    ctrl_t r;
    r = '{alu_op: op, use_lit: 1'b1, rd_f: 1'b0, wr_w: 1'b1, wr_f: 1'b0,
          upd_z: z, upd_c: c, upd_dc: dc, flow: fl, illegal: 1'b0};
    return r;
  endfunction

  localparam ctrl_t NOP_CTRL = '{alu_op: ALU_PASS_A, use_lit: 1'b0, rd_f: 1'b0,
                                 wr_w: 1'b0, wr_f: 1'b0, upd_z: 1'b0, upd_c: 1'b0,
                                 upd_dc: 1'b0, flow: FLOW_NONE, illegal: 1'b0};

  always_comb begin
    ctrl = NOP_CTRL;
    unique case (instr[13:12])
      2'b00: begin
        unique case (instr[11:8])
          4'b0000: begin
            if (d) begin
              // MOVWF f
              ctrl = byte_op(ALU_PASS_W, 1'b1, 1'b0, 1'b0, 1'b0, FLOW_NONE);
              ctrl.rd_f = 1'b0;
            end else if (instr[4:0] == 5'b00000) begin
              ctrl = NOP_CTRL;                                     // NOP
            end else if (instr[6:0] == 7'b000_1000) begin
              ctrl.flow = FLOW_RETURN;                             // RETURN
            end else if (instr[6:0] == 7'b110_1001 || instr[6:0] == 7'b000_1001) begin
              ctrl.flow = FLOW_RETFIE;                             // RETFIE
            end else if (instr[6:0] == 7'b110_0011) begin
              ctrl.flow = FLOW_SLEEP;                              // SLEEP
            end else if (instr[6:0] == 7'b110_0100) begin
              ctrl = NOP_CTRL;                                     // CLRWDT
            end else begin
              ctrl.illegal = 1'b1;
            end
          end
          4'b0001: begin                                           // CLRF / CLRW
            ctrl = byte_op(ALU_CLR, d, 1'b1, 1'b0, 1'b0, FLOW_NONE);
            ctrl.rd_f = 1'b0;
          end
          4'b0010: ctrl = byte_op(ALU_SUB,  d, 1'b1, 1'b1, 1'b1, FLOW_NONE);   // SUBWF
          4'b0011: ctrl = byte_op(ALU_DEC,  d, 1'b1, 1'b0, 1'b0, FLOW_NONE);   // DECF
          4'b0100: ctrl = byte_op(ALU_IOR,  d, 1'b1, 1'b0, 1'b0, FLOW_NONE);   // IORWF
          4'b0101: ctrl = byte_op(ALU_AND,  d, 1'b1, 1'b0, 1'b0, FLOW_NONE);   // ANDWF
          4'b0110: ctrl = byte_op(ALU_XOR,  d, 1'b1, 1'b0, 1'b0, FLOW_NONE);   // XORWF
          4'b0111: ctrl = byte_op(ALU_ADD,  d, 1'b1, 1'b1, 1'b1, FLOW_NONE);   // ADDWF
          4'b1000: ctrl = byte_op(ALU_PASS_A, d, 1'b1, 1'b0, 1'b0, FLOW_NONE); // MOVF
          4'b1001: ctrl = byte_op(ALU_COM,  d, 1'b1, 1'b0, 1'b0, FLOW_NONE);   // COMF
          4'b1010: ctrl = byte_op(ALU_INC,  d, 1'b1, 1'b0, 1'b0, FLOW_NONE);   // INCF
          4'b1011: ctrl = byte_op(ALU_DEC,  d, 1'b0, 1'b0, 1'b0, FLOW_SKIPZ);  // DECFSZ
          4'b1100: ctrl = byte_op(ALU_RRF,  d, 1'b0, 1'b1, 1'b0, FLOW_NONE);   // RRF
          4'b1101: ctrl = byte_op(ALU_RLF,  d, 1'b0, 1'b1, 1'b0, FLOW_NONE);   // RLF
          4'b1110: ctrl = byte_op(ALU_SWAP, d, 1'b0, 1'b0, 1'b0, FLOW_NONE);   // SWAPF
          4'b1111: ctrl = byte_op(ALU_INC,  d, 1'b0, 1'b0, 1'b0, FLOW_SKIPZ);  // INCFSZ
          default: ctrl.illegal = 1'b1;
        endcase
      end
      2'b01: begin
        unique case (instr[11:10])
          2'b00: ctrl = byte_op(ALU_BCF,   1'b1, 1'b0, 1'b0, 1'b0, FLOW_NONE);   // BCF
          2'b01: ctrl = byte_op(ALU_BSF,   1'b1, 1'b0, 1'b0, 1'b0, FLOW_NONE);   // BSF
          2'b10: begin                                                         // BTFSC
            ctrl = byte_op(ALU_BTEST, 1'b0, 1'b0, 1'b0, 1'b0, FLOW_SKIPZ);
            ctrl.wr_w = 1'b0;
          end
          default: begin                                                       // BTFSS
            ctrl = byte_op(ALU_BTEST, 1'b0, 1'b0, 1'b0, 1'b0, FLOW_SKIPNZ);
            ctrl.wr_w = 1'b0;
          end
        endcase
      end
      2'b10: begin
        ctrl.flow = instr[11] ? FLOW_GOTO : FLOW_CALL;               // GOTO / CALL
      end
      default: begin
        unique casez (instr[11:8])
          4'b00??: ctrl = lit_op(ALU_PASS_A, 1'b0, 1'b0, 1'b0, FLOW_NONE);  // MOVLW
          4'b01??: ctrl = lit_op(ALU_PASS_A, 1'b0, 1'b0, 1'b0, FLOW_RETLW); // RETLW
          4'b1000: ctrl = lit_op(ALU_IOR,    1'b1, 1'b0, 1'b0, FLOW_NONE);  // IORLW
          4'b1001: ctrl = lit_op(ALU_AND,    1'b1, 1'b0, 1'b0, FLOW_NONE);  // ANDLW
          4'b1010: ctrl = lit_op(ALU_XOR,    1'b1, 1'b0, 1'b0, FLOW_NONE);  // XORLW
          4'b110?: ctrl = lit_op(ALU_SUB,    1'b1, 1'b1, 1'b1, FLOW_NONE);  // SUBLW
          4'b111?: ctrl = lit_op(ALU_ADD,    1'b1, 1'b1, 1'b1, FLOW_NONE);  // ADDLW
          default: ctrl.illegal = 1'b1;
        endcase
      end
    endcase
  end

endmodule
