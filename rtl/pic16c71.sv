// pic16c71: 8-bit Harvard microcontroller core in the style of the PIC16C71.
//
// Structure (one block per box of the architecture drawing): EPROM program
// memory on a 14-bit program bus, the instruction register, the instruction
// decode and control, a 13-bit program counter with an 8-level stack, the
// RAM file registers reached through an address MUX (direct 7-bit address
// from the instruction, or indirect through the FSR), the STATUS and FSR
// registers, a MUX that picks the literal or the 8-bit data bus as the ALU's
// operand, the ALU, the working register W, and the two I/O ports A and B.
//
// Timing: one instruction cycle is eight clocks Q1..Q8 and the core is not
// pipelined.
//   Q1  the PC is copied to the fetch address and incremented
//   Q5  the addressed word is latched into the instruction register
//   Q6  the file-register operand is read onto the data bus (operand read)
//   Q8  the result is written to W or to the file register (destination
//       write), STATUS flags are updated and the PC is changed by GOTO,
//       CALL, returns, skips or a write to PCL.
// Every instruction takes one instruction cycle except those that change
// the program flow (GOTO, CALL, RETURN, RETLW, RETFIE, a taken skip, a write
// to PCL): they are followed by one dummy instruction cycle in which nothing
// is fetched or executed, so they take two, as in the instruction table.
// `ready` is high in Q1 of every instruction cycle that starts a new
// instruction: it is the "ready state" at which the architecture-level
// state (PC, W, registers) is defined.  SLEEP stops the core until reset.
//
// The block diagram, the word widths, the Q-cycle events, the 36 general
// purpose registers, the 8-level stack and the instruction set are the
// documented ones.  The SFR addresses, STATUS bit positions, PCLATH, the
// TRIS registers of the ports, reset values, the dummy-cycle realisation of
// two-cycle instructions and SLEEP stopping the core are this design's
// choices, taken from the PIC family.  Timer, A/D converter, interrupts and
// watchdog of the commercial part are not modelled.
//
// Lint notes: rst_n is also read by the disable clause of the assertion
// below, so lint sees it used both as an asynchronous reset and as a
// synchronous signal; the logic itself uses it only as the asynchronous reset.
// The stack's depth and underflow outputs and the decoded `illegal`
// flag are left unconnected on purpose: an unknown word runs as a NOP and
// a return with an empty stack just pops a stale entry, as in the PIC.
module pic16c71
  import pic_pkg::*;
#(
  parameter int unsigned PROG_WORDS = 1024,
  parameter int unsigned GPR_COUNT  = 36
) (
  input  logic   clk,
  input  logic   rst_n,
  // EPROM programming port
  input  logic   prog_we,
  input  pc_t    prog_addr,
  input  instr_t prog_wdata,
  // I/O ports: pin inputs, output latches and output enables (TRIS bit 0)
  input  byte_t  porta_in,
  output byte_t  porta_out,
  output byte_t  porta_oe,
  input  byte_t  portb_in,
  output byte_t  portb_out,
  output byte_t  portb_oe,
  // status
  output logic   ready,      // Q1 of an instruction cycle that executes
  output pc_t    pc,
  output byte_t  w,
  output byte_t  status,
  output logic   sleeping,
  output logic   skip_taken, // pulse: a skip instruction skipped
  output logic   branch,     // pulse: GOTO/CALL/return/PCL write changed the PC
  output logic   stack_ovf   // pulse: CALL with all 8 stack levels in use
);

  // ------------------------------------------------------------ Q sequencer
  logic [2:0] q;            // 0..7 = Q1..Q8
  logic       dummy;        // current instruction cycle is a dummy cycle
  logic       q1, q5, q6, q8;

  assign q1 = (q == 3'd0);
  assign q5 = (q == 3'd4);
  assign q6 = (q == 3'd5);
  assign q8 = (q == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (!sleeping) q <= q + 3'd1;
  end

  assign ready = q1 && !dummy && !sleeping;

  // ----------------------------------------------------------- fetch path
  pc_t    fetch_pc;
  instr_t prog_rdata;
  instr_t ir;

  pic_prog_mem #(.WORDS(PROG_WORDS)) u_prog (
    .clk, .addr(fetch_pc), .rdata(prog_rdata),
    .prog_we, .prog_addr, .prog_wdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_pc <= '0;
      ir       <= '0;
    end else if (!sleeping) begin
      if (q1 && !dummy) fetch_pc <= pc;
      if (q5) ir <= dummy ? '0 : prog_rdata;   // dummy cycle executes a NOP
    end
  end

  // ---------------------------------------------------------------- decode
  ctrl_t       ctrl;
  logic [6:0]  f;
  logic [2:0]  bsel;
  byte_t       k8;
  logic [10:0] k11;

  pic_decoder u_dec (.instr(ir), .ctrl, .f, .b(bsel), .k8, .k11);

  // ------------------------------------------------------ special registers
  byte_t      fsr;
  logic [4:0] pclath;
  byte_t      porta_lat, portb_lat, trisa, trisb;

  // address MUX: direct address from the instruction or indirect via FSR
  logic [7:0] ea;
  logic [8:0] ram_addr;
  logic       indirect;
  assign indirect = (f == A_INDF);
  assign ea       = indirect ? fsr : {status[ST_RP0], f};
  assign ram_addr = {status[ST_IRP], ea};

  logic sel_indf, sel_pcl, sel_status, sel_fsr, sel_pa, sel_pb, sel_pclath;
  logic bank1;
  assign bank1      = ea[7];
  assign sel_indf   = (ea[6:0] == A_INDF);
  assign sel_pcl    = (ea[6:0] == A_PCL);
  assign sel_status = (ea[6:0] == A_STATUS);
  assign sel_fsr    = (ea[6:0] == A_FSR);
  assign sel_pa     = (ea[6:0] == A_PORTA);
  assign sel_pb     = (ea[6:0] == A_PORTB);
  assign sel_pclath = (ea[6:0] == A_PCLATH);

  // ------------------------------------------------------- file registers
  byte_t gpr_rdata;
  logic  gpr_hit;
  logic  wr_file;          // destination write to a file register this clock
  byte_t alu_y;

  assign wr_file = q8 && !dummy && ctrl.wr_f;

  pic_file_regs #(.COUNT(GPR_COUNT)) u_ram (
    .clk, .addr(ram_addr), .we(wr_file), .wdata(alu_y),
    .rdata(gpr_rdata), .hit(gpr_hit)
  );

  // data bus read MUX (used at Q6)
  byte_t bus_rd;
  always_comb begin
    bus_rd = '0;
    if (gpr_hit)         bus_rd = gpr_rdata;
    else if (sel_indf)   bus_rd = '0;
    else if (sel_pcl)    bus_rd = pc[7:0];
    else if (sel_status) bus_rd = status;
    else if (sel_fsr)    bus_rd = fsr;
    else if (sel_pa)     bus_rd = bank1 ? trisa : ((trisa & porta_in) | (~trisa & porta_lat));
    else if (sel_pb)     bus_rd = bank1 ? trisb : ((trisb & portb_in) | (~trisb & portb_lat));
    else if (sel_pclath) bus_rd = {3'b000, pclath};
  end

  byte_t operand;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) operand <= '0;
    else if (q6 && !sleeping) operand <= bus_rd;
  end

  // ------------------------------------------------------------------- ALU
  logic alu_c, alu_dc, alu_z;
  pic_alu u_alu (
    .op(ctrl.alu_op), .a(ctrl.use_lit ? k8 : operand), .w,
    .bsel, .c_in(status[ST_C]),
    .result(alu_y), .c_out(alu_c), .dc_out(alu_dc), .z_out(alu_z)
  );

  // --------------------------------------------------------- program flow
  logic exec;              // Q8 of a real (non-dummy) instruction cycle
  logic do_skip, do_goto, do_call, do_ret, do_pclw, do_sleep;
  assign exec     = q8 && !dummy && !sleeping;
  assign do_skip  = exec && ((ctrl.flow == FLOW_SKIPZ  &&  alu_z) ||
                             (ctrl.flow == FLOW_SKIPNZ && !alu_z));
  assign do_goto  = exec && (ctrl.flow == FLOW_GOTO);
  assign do_call  = exec && (ctrl.flow == FLOW_CALL);
  assign do_ret   = exec && (ctrl.flow inside {FLOW_RETURN, FLOW_RETLW, FLOW_RETFIE});
  assign do_pclw  = exec && ctrl.wr_f && !gpr_hit && sel_pcl;
  assign do_sleep = exec && (ctrl.flow == FLOW_SLEEP);

  logic pc_load;
  pc_t  pc_load_val;
  assign pc_load     = do_goto || do_call || do_pclw;
  assign pc_load_val = do_pclw ? {pclath, alu_y} : {pclath[4:3], k11};

  logic [$clog2(STACK_DEPTH+1)-1:0] stack_depth;
  logic stack_unf;

  pic_pc_stack u_pc (
    .clk, .rst_n,
    .inc((q1 && !dummy && !sleeping) || do_skip),
    .load(pc_load), .load_val(pc_load_val),
    .push(do_call), .pop(do_ret),
    .pc, .depth(stack_depth), .ovf(stack_ovf), .unf(stack_unf)
  );

  // ----------------------------------------------- registers written at Q8
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w         <= '0;
      status    <= 8'h18;      // TO = PD = 1 after power-on
      fsr       <= '0;
      pclath    <= '0;
      porta_lat <= '0;
      portb_lat <= '0;
      trisa     <= 8'hFF;      // all pins inputs after reset
      trisb     <= 8'hFF;
      dummy     <= 1'b0;
      sleeping  <= 1'b0;
    end else if (q8 && !sleeping) begin
      dummy <= do_skip || do_goto || do_call || do_ret || do_pclw;
      if (!dummy) begin
        if (ctrl.wr_w) w <= alu_y;
        if (ctrl.flow == FLOW_RETLW) w <= k8;
        if (wr_file && !gpr_hit) begin
          if (sel_status) status[7:5] <= alu_y[7:5];
          if (sel_status) status[2:0] <= alu_y[2:0];
          if (sel_fsr)    fsr <= alu_y;
          if (sel_pclath) pclath <= alu_y[4:0];
          if (sel_pa) begin
            if (bank1) trisa <= alu_y; else porta_lat <= alu_y;
          end
          if (sel_pb) begin
            if (bank1) trisb <= alu_y; else portb_lat <= alu_y;
          end
        end
        // flag updates take precedence over a write of the result to STATUS
        if (ctrl.upd_z)  status[ST_Z]  <= alu_z;
        if (ctrl.upd_c)  status[ST_C]  <= alu_c;
        if (ctrl.upd_dc) status[ST_DC] <= alu_dc;
        if (do_sleep) begin
          sleeping          <= 1'b1;
          status[ST_PD]     <= 1'b0;
          status[ST_TO]     <= 1'b1;
        end
      end
    end
  end

  assign porta_out  = porta_lat;
  assign porta_oe   = ~trisa;
  assign portb_out  = portb_lat;
  assign portb_oe   = ~trisb;
  assign skip_taken = do_skip;
  assign branch     = do_goto || do_call || do_ret || do_pclw;

  // a dummy cycle never follows another dummy cycle
  assert property (@(posedge clk) disable iff (!rst_n) (q8 && dummy) |=> !dummy);

endmodule
