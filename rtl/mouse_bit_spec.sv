// mouse_bit_spec: the "Bit" routine of the serial mouse controller as a
// hardware state machine (motion detection of the X and Y quadrature
// encoders).
//
// On `start` the machine walks states S1..S17 once.  For each axis it
// compares the present encoder clock pin (xc / yc) with the level stored at
// the previous call (the CSTAT bits).  A rising edge (pin 1, stored 0) or a
// falling edge (pin 0, stored 1) increments the axis count, clears the
// direction flag and stores the new level; the direction flag is then set
// when the data pin reads 0 on a rising edge or 1 on a falling edge.  So
// RightFlag / UpFlag set means the last step went right / up, and
// XCount / YCount count steps since the last `clear`.  After S17 the machine
// waits DELAY_CYCLES clocks (the 0.833 ms bit time of a 1200 baud serial
// line) and pulses `done`.  One state per clock; inputs are sampled in the
// state that tests them.
//
// The states, their tests and actions follow the Bit routine's flowchart
// and state diagram.  Storing the new clock level in the edge states, the
// `clear` input (counts and flags to zero, used by the caller once it has
// taken the counts for a report), the `negx`/`negy` inputs through which the
// Main routine negates a count (two's complement), and the delay counter are
// this design's choices.  clear, negx and negy act only while the machine is
// idle, between calls, which is the only time the caller runs; clear wins
// over a negation given in the same clock.  The two RightFlag properties
// of the routine are written as assertions at the end.
//
// Lint notes: rst_n is also read by the disable clauses of those
// assertions, so lint sees it used both as an asynchronous reset and as a
// synchronous signal; the logic itself uses it only as the asynchronous reset.
module mouse_bit_spec #(
  parameter int unsigned DELAY_CYCLES = 833   // 0.833 ms at a 1 MHz clock
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       clear,
  input  logic       negx,       // XCount <= -XCount (idle only)
  input  logic       negy,       // YCount <= -YCount (idle only)
  input  logic       xc,         // XClock pin
  input  logic       xd,         // XData pin
  input  logic       yc,         // YClock pin
  input  logic       yd,         // YData pin
  output logic [7:0] xcount,
  output logic [7:0] ycount,
  output logic       rightflag,
  output logic       upflag,
  output logic       busy,
  output logic       done
);

  typedef enum logic [4:0] {
    IDLE, S1, S2, S3, S4, S5, S6, S7, S8, S9,
    S10, S11, S12, S13, S14, S15, S16, S17, DELAY
  } state_e;

  state_e state;
  logic   cstat_xc, cstat_yc;
  logic [$clog2(DELAY_CYCLES+1)-1:0] dcnt;

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      cstat_xc  <= 1'b0;
      cstat_yc  <= 1'b0;
      xcount    <= '0;
      ycount    <= '0;
      rightflag <= 1'b0;
      upflag    <= 1'b0;
      dcnt      <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (negx) xcount <= 8'd0 - xcount;
          if (negy) ycount <= 8'd0 - ycount;
          if (clear) begin
            xcount    <= '0;
            ycount    <= '0;
            rightflag <= 1'b0;
            upflag    <= 1'b0;
          end
          if (start) state <= S1;
        end
        // ---------------- X axis
        S1:  state <= xc ? S2 : S5;
        S2:  state <= cstat_xc ? S9 : S3;
        S3: begin                       // rising edge of XClock
          xcount    <= xcount + 8'd1;
          rightflag <= 1'b0;
          cstat_xc  <= 1'b1;
          state     <= S4;
        end
        S4:  state <= xd ? S9 : S8;
        S5:  state <= cstat_xc ? S6 : S9;
        S6: begin                       // falling edge of XClock
          xcount    <= xcount + 8'd1;
          rightflag <= 1'b0;
          cstat_xc  <= 1'b0;
          state     <= S7;
        end
        S7:  state <= xd ? S8 : S9;
        S8: begin
          rightflag <= 1'b1;
          state     <= S9;
        end
        // ---------------- Y axis
        S9:  state <= yc ? S10 : S13;
        S10: state <= cstat_yc ? S17 : S11;
        S11: begin                      // rising edge of YClock
          ycount   <= ycount + 8'd1;
          upflag   <= 1'b0;
          cstat_yc <= 1'b1;
          state    <= S12;
        end
        S12: state <= yd ? S17 : S16;
        S13: state <= cstat_yc ? S14 : S17;
        S14: begin                      // falling edge of YClock
          ycount   <= ycount + 8'd1;
          upflag   <= 1'b0;
          cstat_yc <= 1'b0;
          state    <= S15;
        end
        S15: state <= yd ? S16 : S17;
        S16: begin
          upflag <= 1'b1;
          state  <= S17;
        end
        S17: begin
          dcnt  <= '0;
          state <= DELAY;
        end
        DELAY: begin
          if (32'(dcnt) >= DELAY_CYCLES - 1) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            dcnt <= dcnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The two RightFlag properties, at the XData test that follows a rising
  // XClock edge (pin 1 while the stored level was 0): with XData = 1 the
  // flag is and stays clear, with XData = 0 it is set one state later.
  a_rise_xdata1_clears: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S4 && xd) |-> !rightflag ##1 !rightflag);
  a_rise_xdata0_sets: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S4 && !xd) |-> ##2 rightflag);

endmodule
