// embedded_system_top: the serial-mouse embedded system and the example pair.
//
// Part 1, the mouse controller: the pic16c71 core, whose program (the mouse
// firmware) is written through the EPROM programming port.  Port A carries
// the encoder inputs: RA2 = XClock, RA3 = XData, RA0 = YClock, RA1 = YData;
// the other pins, port B and the serial "Received Data" line are whatever
// the firmware makes of them.  Beside the core runs mouse_bit_spec, the
// motion-detection (Bit) routine built directly as a state machine and fed
// from the same encoder pins, so its counts and flags can be compared with
// what the firmware computes; `bit_start`/`bit_clear` pace it.  Also on
// the same pins runs mouse_controller_spec, the whole controller software
// (Main, Byte, Bit) built as hardware: it reads the buttons on RB0..RB2 and
// the encoders, and sends its five-byte reports on `mouse_rd`.
//
// Part 2, the example of the specification/implementation pair: the three
// state flowchart machine and the five-instruction program machine share
// their inputs (initial R1/R2, bit numbers b1/b2, `ex_load`) and each has
// its own enable, so a caller can pace the specification by the program's
// pc.  The two parts do not interact.
//
// The pin assignment of XClock/XData follows the firmware excerpt (RA.b2,
// RA.b3); those of YClock/YData and of the buttons are this design's
// choice.
//
// Lint notes: the counts and flags of the complete controller are left
// unconnected here (the Bit reference machine's are the ones brought out),
// and rst_n is reported as used both asynchronously and synchronously
// because the assertions inside the blocks read it in their disable
// clauses.
module embedded_system_top
  import pic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // microcontroller
  input  logic        prog_we,
  input  pc_t         prog_addr,
  input  instr_t      prog_wdata,
  input  byte_t       porta_in,
  output byte_t       porta_out,
  output byte_t       porta_oe,
  input  byte_t       portb_in,
  output byte_t       portb_out,
  output byte_t       portb_oe,
  output logic        mcu_ready,
  output pc_t         mcu_pc,
  output byte_t       mcu_w,
  output byte_t       mcu_status,
  output logic        mcu_sleeping,
  output logic        mcu_skip,
  output logic        mcu_branch,
  output logic        mcu_stack_ovf,
  // Bit routine reference machine
  input  logic        bit_start,
  input  logic        bit_clear,
  output logic [7:0]  bit_xcount,
  output logic [7:0]  bit_ycount,
  output logic        bit_rightflag,
  output logic        bit_upflag,
  output logic        bit_busy,
  output logic        bit_done,
  // complete mouse controller (Main, Byte and Bit machines)
  output logic        mouse_rd,
  output logic        mouse_trigger,
  output logic        mouse_report,
  output logic        mouse_bit_tick,
  // example specification / implementation pair
  input  logic        ex_load,
  input  logic [7:0]  ex_r1_init,
  input  logic [7:0]  ex_r2_init,
  input  logic [2:0]  ex_b1,
  input  logic [2:0]  ex_b2,
  input  logic        ex_spec_en,
  input  logic        ex_impl_en,
  output logic [7:0]  ex_spec_r1,
  output logic [7:0]  ex_spec_r2,
  output logic [1:0]  ex_spec_s,
  output logic        ex_spec_halted,
  output logic [7:0]  ex_impl_r1,
  output logic [7:0]  ex_impl_r2,
  output logic [2:0]  ex_impl_pc,
  output logic        ex_impl_halted
);

  pic16c71 u_mcu (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_wdata,
    .porta_in, .porta_out, .porta_oe,
    .portb_in, .portb_out, .portb_oe,
    .ready(mcu_ready), .pc(mcu_pc), .w(mcu_w), .status(mcu_status),
    .sleeping(mcu_sleeping), .skip_taken(mcu_skip), .branch(mcu_branch),
    .stack_ovf(mcu_stack_ovf)
  );

  mouse_bit_spec u_bit (
    .clk, .rst_n,
    .start(bit_start), .clear(bit_clear), .negx(1'b0), .negy(1'b0),
    .xc(porta_in[2]), .xd(porta_in[3]), .yc(porta_in[0]), .yd(porta_in[1]),
    .xcount(bit_xcount), .ycount(bit_ycount),
    .rightflag(bit_rightflag), .upflag(bit_upflag),
    .busy(bit_busy), .done(bit_done)
  );

  mouse_controller_spec u_mouse (
    .clk, .rst_n,
    .buttons(portb_in[2:0]),
    .xc(porta_in[2]), .xd(porta_in[3]), .yc(porta_in[0]), .yd(porta_in[1]),
    .rd(mouse_rd), .trigger(mouse_trigger), .report(mouse_report),
    .bit_tick(mouse_bit_tick),
    .xcount(), .ycount(), .rightflag(), .upflag()
  );

  example_spec u_ex_spec (
    .clk, .rst_n, .en(ex_spec_en), .load(ex_load),
    .r1_init(ex_r1_init), .r2_init(ex_r2_init), .b1(ex_b1), .b2(ex_b2),
    .r1(ex_spec_r1), .r2(ex_spec_r2), .s(ex_spec_s), .halted(ex_spec_halted)
  );

  example_impl u_ex_impl (
    .clk, .rst_n, .en(ex_impl_en), .load(ex_load),
    .r1_init(ex_r1_init), .r2_init(ex_r2_init), .b1(ex_b1), .b2(ex_b2),
    .r1(ex_impl_r1), .r2(ex_impl_r2), .pc(ex_impl_pc), .halted(ex_impl_halted)
  );

endmodule
