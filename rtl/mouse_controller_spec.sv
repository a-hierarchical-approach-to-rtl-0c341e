// mouse_controller_spec: the complete serial mouse controller software
// (Main, Byte and Bit routines) built as three cooperating state machines.
//
// Main loops forever deciding whether a report is due and calls Byte five
// times per loop; Byte calls Bit nine times per byte (start bit plus eight
// data bits) and drives the serial line RD; Bit scans the two quadrature
// encoders and keeps the counts and direction flags, then waits one bit
// time.  A call is a one-clock start pulse and a one-clock done pulse, so
// the hierarchy of calls in the software becomes a chain of handshakes
// here: Main -> Byte -> Bit.  Each routine's state machine is a module of
// its own and can be checked on its own against its flowchart before it is
// used by its caller.
//
// Interface: button and encoder pins in, RD out.  Also brought out for
// observation: the Trigger flag, a `report` pulse after each report sent,
// `bit_tick` (the Bit routine's return, one per bit time of RD) and the
// Bit machine's counts and flags.  With DELAY_CYCLES = 833 and a 1 MHz
// clock one bit lasts a little over 0.833 ms (1200 baud plus the few
// clocks of the state walk), and one loop of Main lasts 45 bit times.
//
// Which pins are which is for the level above to decide.  The split into
// three machines follows the routines of the software; the call handshake
// is this design's choice.
//
// Lint notes: rst_n is also read by the disable clause of the assertion
// below, so lint sees it used both as an asynchronous reset and as a
// synchronous signal; the logic itself uses it only as the asynchronous reset.
module mouse_controller_spec #(
  parameter int unsigned DELAY_CYCLES = 833
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] buttons,
  input  logic       xc,
  input  logic       xd,
  input  logic       yc,
  input  logic       yd,
  output logic       rd,
  output logic       trigger,
  output logic       report,
  output logic       bit_tick,
  output logic [7:0] xcount,
  output logic [7:0] ycount,
  output logic       rightflag,
  output logic       upflag
);

  logic       negx, negy, bit_clear;
  logic       byte_start, byte_done, byte_busy;
  logic [7:0] byte_data;
  logic       bit_start, bit_busy;

  mouse_main_spec u_main (
    .clk, .rst_n, .buttons,
    .xcount, .ycount, .rightflag, .upflag,
    .negx, .negy, .bit_clear,
    .byte_start, .byte_data, .byte_done,
    .trigger, .report
  );

  mouse_byte_spec u_byte (
    .clk, .rst_n,
    .start(byte_start), .data(byte_data), .trigger,
    .rd, .busy(byte_busy), .done(byte_done),
    .bit_start, .bit_done(bit_tick)
  );

  mouse_bit_spec #(.DELAY_CYCLES(DELAY_CYCLES)) u_bit (
    .clk, .rst_n,
    .start(bit_start), .clear(bit_clear), .negx, .negy,
    .xc, .xd, .yc, .yd,
    .xcount, .ycount, .rightflag, .upflag,
    .busy(bit_busy), .done(bit_tick)
  );

  // Main acts on the Bit machine's registers only while no call is open
  a_main_acts_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (negx || negy || bit_clear) |-> !bit_busy && !byte_busy);

endmodule
