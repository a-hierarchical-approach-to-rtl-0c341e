// pic_pkg: types and constants shared by the PIC16C71-style microcontroller.
//
// Word sizes follow the architecture: 8-bit data, 14-bit instruction words,
// 13-bit program counter, an 8-level return stack and an instruction cycle
// of eight Q clocks (Q1..Q8).  The ALU operation codes, the decoded-control
// struct and the special function register (SFR) addresses are this design's
// own encoding; the SFR map and STATUS bit positions follow the usual
// mid-range PIC layout.
package pic_pkg;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned INSTR_W = 14;
  localparam int unsigned PC_W    = 13;
  localparam int unsigned STACK_DEPTH = 8;
  localparam int unsigned Q_CYCLES    = 8;

  typedef logic [DATA_W-1:0]  byte_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [PC_W-1:0]    pc_t;

  // ALU operations
  typedef enum logic [4:0] {
    ALU_PASS_A,   // result = a (MOVF, MOVLW, RETLW)
    ALU_PASS_W,   // result = w (MOVWF)
    ALU_CLR,      // result = 0 (CLRF, CLRW)
    ALU_ADD,      // a + w
    ALU_SUB,      // a - w (SUBWF: f - W, SUBLW: k - W)
    ALU_AND,
    ALU_IOR,
    ALU_XOR,
    ALU_COM,      // ~a
    ALU_INC,
    ALU_DEC,
    ALU_RLF,      // rotate left through carry
    ALU_RRF,      // rotate right through carry
    ALU_SWAP,     // swap nibbles
    ALU_BCF,      // clear bit b of a
    ALU_BSF,      // set bit b of a
    ALU_BTEST     // result = a, zero flag = (bit b of a == 0)
  } alu_op_e;

  // Program-flow class of an instruction
  typedef enum logic [3:0] {
    FLOW_NONE,
    FLOW_SKIPZ,    // skip next if ALU zero flag (DECFSZ, INCFSZ, BTFSC)
    FLOW_SKIPNZ,   // skip next if ALU zero flag clear (BTFSS)
    FLOW_GOTO,
    FLOW_CALL,
    FLOW_RETURN,
    FLOW_RETLW,
    FLOW_RETFIE,
    FLOW_SLEEP
  } flow_e;

  typedef struct packed {
    alu_op_e alu_op;
    logic    use_lit;   // ALU operand A is the literal k, not the file register
    logic    rd_f;      // instruction reads file register f
    logic    wr_w;      // result goes to W
    logic    wr_f;      // result goes to file register f
    logic    upd_z;     // instruction updates Z
    logic    upd_c;     // instruction updates C
    logic    upd_dc;    // instruction updates DC
    flow_e   flow;
    logic    illegal;   // word matches no instruction (executed as NOP)
  } ctrl_t;

  // SFR addresses (low 7 bits of the file address)
  localparam logic [6:0] A_INDF   = 7'h00;
  localparam logic [6:0] A_PCL    = 7'h02;
  localparam logic [6:0] A_STATUS = 7'h03;
  localparam logic [6:0] A_FSR    = 7'h04;
  localparam logic [6:0] A_PORTA  = 7'h05;  // TRISA in bank 1
  localparam logic [6:0] A_PORTB  = 7'h06;  // TRISB in bank 1
  localparam logic [6:0] A_PCLATH = 7'h0A;

  // STATUS bit positions
  localparam int unsigned ST_C   = 0;
  localparam int unsigned ST_DC  = 1;
  localparam int unsigned ST_Z   = 2;
  localparam int unsigned ST_PD  = 3;
  localparam int unsigned ST_TO  = 4;
  localparam int unsigned ST_RP0 = 5;
  localparam int unsigned ST_IRP = 7;

endpackage
