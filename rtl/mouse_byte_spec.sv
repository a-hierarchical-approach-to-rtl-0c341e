// mouse_byte_spec: the "Byte" routine of the serial mouse controller as a
// hardware state machine: it sends one data byte on the serial "Received
// Data" line RD, one bit per call of the Bit routine.
//
// On `start` the byte on `data` is copied into a shift register and the
// machine walks its states S1..S11:
//   S1  Count <= 0
//   S2  Trigger flag set?  yes -> S3, no -> S4
//   S3  RD <= 0 (start bit)
//   S4  call Bit
//   S5  Trigger flag set?  yes -> S6, no -> S10
//   S6  shift the least significant data bit into Carry
//   S7  Carry?  1 -> S8, 0 -> S9
//   S8  RD <= 1            S9  RD <= 0
//   S10 call Bit, Count <= Count + 1
//   S11 Count = 8?  yes -> return (`done`), no -> S5
// With the Trigger flag set, RD therefore carries a start bit (0) and the
// eight data bits, least significant first, each held for the length of
// one Bit call; the Bit routine's fixed delay makes that the bit time of
// the serial line.  With the flag clear RD is not driven low and nothing is
// sent, but the Bit routine is still called nine times, so the encoders are
// scanned at the same rate whether or not a report goes out.
//
// Interface: `start`/`done` (one-clock pulse) is the call/return of the
// routine; `bit_start` (one-clock pulse) calls the Bit machine and
// `bit_done` is its return.  One state per clock, plus the clocks spent
// inside each Bit call.  RD is high after reset.
//
// The states, their tests and actions follow the Byte routine's flowchart
// and state diagram, including the count of eight (the diagram's
// "Count = 8").  Driving RD high in S2 when the flag is clear is this
// design's choice: it makes "RD stays high while the Trigger flag is
// clear" hold even after a report whose last data bit was 0.  Neither
// figure shows a stop bit, and none is sent: RD keeps the last data bit
// until the next byte's start bit or the next byte without a report.
//
// Lint notes: rst_n is also read by the disable clause of the assertion
// below, so lint sees it used both as an asynchronous reset and as a
// synchronous signal; the logic itself uses it only as the asynchronous reset.
module mouse_byte_spec (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  input  logic       trigger,     // Trigger flag of the Main routine
  output logic       rd,          // "Received Data" serial line
  output logic       busy,
  output logic       done,
  output logic       bit_start,   // call of the Bit routine
  input  logic       bit_done     // return of the Bit routine
);

  typedef enum logic [3:0] {
    IDLE, S1, S2, S3, S4, S5, S6, S7, S8, S9, S10, S11
  } state_e;

  state_e     state;
  logic [7:0] shreg;
  logic [3:0] count;
  logic       carry;
  logic       calling;        // a Bit call of S4/S10 is in progress

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      shreg     <= '0;
      count     <= '0;
      carry     <= 1'b0;
      calling   <= 1'b0;
      rd        <= 1'b1;
      done      <= 1'b0;
      bit_start <= 1'b0;
    end else begin
      done      <= 1'b0;
      bit_start <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          shreg <= data;
          state <= S1;
        end
        S1: begin
          count <= '0;
          state <= S2;
        end
        S2: begin
          if (trigger) state <= S3;
          else begin
            rd    <= 1'b1;
            state <= S4;
          end
        end
        S3: begin
          rd    <= 1'b0;
          state <= S4;
        end
        S4: begin
          if (!calling) begin
            bit_start <= 1'b1;
            calling   <= 1'b1;
          end else if (bit_done) begin
            calling <= 1'b0;
            state   <= S5;
          end
        end
        S5:  state <= trigger ? S6 : S10;
        S6: begin
          carry <= shreg[0];
          shreg <= {1'b0, shreg[7:1]};
          state <= S7;
        end
        S7:  state <= carry ? S8 : S9;
        S8: begin
          rd    <= 1'b1;
          state <= S10;
        end
        S9: begin
          rd    <= 1'b0;
          state <= S10;
        end
        S10: begin
          if (!calling) begin
            bit_start <= 1'b1;
            calling   <= 1'b1;
          end else if (bit_done) begin
            calling <= 1'b0;
            count   <= count + 4'd1;
            state   <= S11;
          end
        end
        S11: begin
          if (count == 4'd8) begin
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            state <= S5;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // a Bit call returns only while one is outstanding
  a_bit_done_when_calling: assert property (@(posedge clk) disable iff (!rst_n)
    bit_done |-> calling);

endmodule
