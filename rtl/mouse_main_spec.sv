// mouse_main_spec: the "Main" routine of the serial mouse controller as a
// hardware state machine.  It decides whether a report is due, and sends
// the five-byte report through the Byte routine.
//
// After reset the machine takes the button levels as the reference (S1).
// It then loops forever:
//   S2  buttons differ from the reference?  yes -> S3, no -> S4
//   S3  Trigger flag <= 1, new reference
//   S4  XCount = 0?  yes -> S6, no -> S5
//   S5  Trigger flag <= 1
//   S6  RightFlag set?  yes -> S7, no -> S8
//   S7  negate XCount
//   S8  YCount = 0?  yes -> S10, no -> S9
//   S9  Trigger flag <= 1
//   S10 UpFlag set?  yes -> S11, no -> S12
//   S11 negate YCount
//   S12 call Byte five times: button byte, X, X, Y, Y
//   S13 Trigger flag <= 0
// The Byte routine sends a byte only while the Trigger flag is set, but it
// scans the encoders (Bit) on every call, so S12 is also where motion is
// counted.  On entering S12 the two counts are copied for the report and,
// when a report is going out, cleared in the Bit machine, so that motion
// during the report is counted for the next one.
//
// Interface: `buttons` are the button pins; xcount/ycount/rightflag/upflag
// come from the Bit machine, and negx/negy/bit_clear act on it (while it is
// idle, which it is whenever this machine is outside S12).  byte_start
// (one-clock pulse) with byte_data calls the Byte machine; byte_done is its
// return.  `report` pulses in S13 when a report has been sent.  One state
// per clock, plus the time spent in the five Byte calls.
//
// The states, their tests and actions follow the Main routine's flowchart
// and state diagram, including the order of the five bytes (button, X, X,
// Y, Y) and the negation of a count whose direction flag is set.  This
// design's own choices: the button byte is 1000_0bbb (bit 7 set as a
// frame marker, the three button pins below); the new button reference is
// stored in S3; the copy-and-clear of the counts on entering S12; and the
// Trigger flag being cleared in S13 (the flowchart's last box sets it,
// which would make every loop a report and contradict the description of
// a trigger that is set only by a change).
//
// Lint notes: rst_n is also read by the disable clause of the assertion
// below, so lint sees it used both as an asynchronous reset and as a
// synchronous signal; the logic itself uses it only as the asynchronous reset.
module mouse_main_spec (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] buttons,
  // Bit machine
  input  logic [7:0] xcount,
  input  logic [7:0] ycount,
  input  logic       rightflag,
  input  logic       upflag,
  output logic       negx,
  output logic       negy,
  output logic       bit_clear,
  // Byte machine
  output logic       byte_start,
  output logic [7:0] byte_data,
  input  logic       byte_done,
  // status
  output logic       trigger,
  output logic       report
);

  typedef enum logic [3:0] {
    S1, S2, S3, S4, S5, S6, S7, S8, S9, S10, S11, S12, S13
  } state_e;

  state_e     state;
  logic [2:0] btn_ref;
  logic [7:0] xs, ys;          // counts copied for the report
  logic [2:0] k;               // Byte calls made in S12
  logic       calling;

  logic entering_s12;
  assign entering_s12 = (state == S12) && (k == 3'd0) && !calling;

  assign negx      = (state == S7);
  assign negy      = (state == S11);
  assign bit_clear = entering_s12 && trigger;

  always_comb begin
    unique case (k)
      3'd0:       byte_data = {5'b10000, btn_ref};
      3'd1, 3'd2: byte_data = xs;
      default:    byte_data = ys;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S1;
      btn_ref    <= '0;
      xs         <= '0;
      ys         <= '0;
      k          <= '0;
      calling    <= 1'b0;
      trigger    <= 1'b0;
      report     <= 1'b0;
      byte_start <= 1'b0;
    end else begin
      report     <= 1'b0;
      byte_start <= 1'b0;
      unique case (state)
        S1: begin
          btn_ref <= buttons;
          trigger <= 1'b0;
          state   <= S2;
        end
        S2:  state <= (buttons != btn_ref) ? S3 : S4;
        S3: begin
          trigger <= 1'b1;
          btn_ref <= buttons;
          state   <= S4;
        end
        S4:  state <= (xcount == 8'd0) ? S6 : S5;
        S5: begin
          trigger <= 1'b1;
          state   <= S6;
        end
        S6:  state <= rightflag ? S7 : S8;
        S7:  state <= S8;
        S8:  state <= (ycount == 8'd0) ? S10 : S9;
        S9: begin
          trigger <= 1'b1;
          state   <= S10;
        end
        S10: state <= upflag ? S11 : S12;
        S11: state <= S12;
        S12: begin
          if (entering_s12) begin
            xs <= xcount;
            ys <= ycount;
          end
          if (!calling) begin
            if (k == 3'd5) begin
              k     <= '0;
              state <= S13;
            end else begin
              byte_start <= 1'b1;
              calling    <= 1'b1;
            end
          end else if (byte_done) begin
            calling <= 1'b0;
            k       <= k + 3'd1;
          end
        end
        S13: begin
          report  <= trigger;
          trigger <= 1'b0;
          state   <= S2;
        end
        default: state <= S1;
      endcase
    end
  end

  a_byte_done_when_calling: assert property (@(posedge clk) disable iff (!rst_n)
    byte_done |-> calling);

endmodule
