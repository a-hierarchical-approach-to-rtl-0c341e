// pic_pc_stack: 13-bit program counter and the 8-level hardware return stack.
//
// One clock edge does at most one of: increment (Q1 of a fetch), load a new
// value (GOTO, CALL, a write to PCL), or pop the stack into the PC (RETURN,
// RETLW, RETFIE).  A load with `push` set also saves the current PC, which
// at that point already addresses the instruction after the CALL, on the
// stack.  The stack is a circular buffer of STACK_DEPTH entries: a ninth
// push overwrites the oldest entry, and `ovf`/`unf` pulse when a push finds
// the stack full or a pop finds it empty; the depth counter saturates.
// The width and depth come from the architecture; the circular overflow
// behaviour and the status pulses are this design's choice.
module pic_pc_stack
  import pic_pkg::*;
#(
  parameter int unsigned DEPTH = STACK_DEPTH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic inc,
  input  logic load,
  input  pc_t  load_val,
  input  logic push,
  input  logic pop,
  output pc_t  pc,
  output logic [$clog2(DEPTH+1)-1:0] depth,
  output logic ovf,
  output logic unf
);

  localparam int unsigned SP_W = $clog2(DEPTH);

  pc_t             stack [DEPTH];
  logic [SP_W-1:0] sp;      // next free slot

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc    <= '0;
      sp    <= '0;
      depth <= '0;
      ovf   <= 1'b0;
      unf   <= 1'b0;
    end else begin
      ovf <= 1'b0;
      unf <= 1'b0;
      if (load) begin
        pc <= load_val;
        if (push) begin
          sp <= (sp == SP_W'(DEPTH-1)) ? '0 : sp + 1'b1;
          if (depth == ($clog2(DEPTH+1))'(DEPTH)) ovf <= 1'b1;
          else depth <= depth + 1'b1;
        end
      end else if (pop) begin
        pc <= stack[(sp == '0) ? SP_W'(DEPTH-1) : sp - 1'b1];
        sp <= (sp == '0) ? SP_W'(DEPTH-1) : sp - 1'b1;
        if (depth == '0) unf <= 1'b1;
        else depth <= depth - 1'b1;
      end else if (inc) begin
        pc <= pc + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (load && push) stack[sp] <= pc;
  end

endmodule
