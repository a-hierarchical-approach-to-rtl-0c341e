// pic_alu: 8-bit arithmetic/logic unit of the microcontroller datapath.
//
// Operand A is a file register or the instruction literal (selected by the
// MUX in front of the ALU), operand W is the working register.  The unit is
// purely combinational and returns the result plus the carry (C), digit
// carry (DC) and zero (Z) flags; the caller decides which flags are written
// back to STATUS.  Subtraction is A + ~W + 1, so C = 1 means "no borrow" and
// DC is the carry out of bit 3, as on PIC parts.  For the bit operations
// `bsel` picks the bit; ALU_BTEST passes A through and sets Z when the
// selected bit is 0, which the skip logic uses.
//
// The operation list follows the instruction set; the flag conventions are
// this design's choice taken from the PIC family.
module pic_alu
  import pic_pkg::*;
(
  input  alu_op_e     op,
  input  byte_t       a,
  input  byte_t       w,
  input  logic [2:0]  bsel,
  input  logic        c_in,
  output byte_t       result,
  output logic        c_out,
  output logic        dc_out,
  output logic        z_out
);

  logic [8:0] sum;
  logic [4:0] nib;

  always_comb begin
    result = a;
    c_out  = c_in;
    dc_out = 1'b0;
    sum    = '0;
    nib    = '0;
    unique case (op)
      ALU_PASS_A: result = a;
      ALU_PASS_W: result = w;
      ALU_CLR:    result = '0;
      ALU_ADD: begin
        sum    = {1'b0, a} + {1'b0, w};
        nib    = {1'b0, a[3:0]} + {1'b0, w[3:0]};
        result = sum[7:0];
        c_out  = sum[8];
        dc_out = nib[4];
      end
      ALU_SUB: begin
        sum    = {1'b0, a} + {1'b0, ~w} + 9'd1;
        nib    = {1'b0, a[3:0]} + {1'b0, ~w[3:0]} + 5'd1;
        result = sum[7:0];
        c_out  = sum[8];
        dc_out = nib[4];
      end
      ALU_AND:  result = a & w;
      ALU_IOR:  result = a | w;
      ALU_XOR:  result = a ^ w;
      ALU_COM:  result = ~a;
      ALU_INC:  result = a + 8'd1;
      ALU_DEC:  result = a - 8'd1;
      ALU_RLF: begin
        result = {a[6:0], c_in};
        c_out  = a[7];
      end
      ALU_RRF: begin
        result = {c_in, a[7:1]};
        c_out  = a[0];
      end
      ALU_SWAP:  result = {a[3:0], a[7:4]};
      ALU_BCF:   result = a & ~(8'd1 << bsel);
      ALU_BSF:   result = a | (8'd1 << bsel);
      ALU_BTEST: result = a;
      default:   result = a;
    endcase
    z_out = (op == ALU_BTEST) ? ~a[bsel] : (result == 8'd0);
  end

endmodule
