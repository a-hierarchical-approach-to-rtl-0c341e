// example_spec: the example flowchart behaviour as a three-state machine.
//
// Registers R1 and R2 are 8 bits wide; b1 and b2 are 3-bit bit numbers.
//   S0: R1 <= R1 - 1 and bit b2 of R2 is set (both at once), go to S1
//   S1: if bit b1 of R1 is 0 go to S2, else back to S0
//   S2: bit b2 of R2 is cleared; the machine stays in S2 (`halted`)
// `load` (in any state) writes R1/R2 from r1_init/r2_init and restarts in
// S0.  The machine advances one state per clock while `en` is high, which
// lets a caller pace it against the five-instruction implementation.
// States and actions follow the example's flowchart and state table; the
// 8-bit register width, `load` and `en` are this design's choices.
module example_spec (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       load,
  input  logic [7:0] r1_init,
  input  logic [7:0] r2_init,
  input  logic [2:0] b1,
  input  logic [2:0] b2,
  output logic [7:0] r1,
  output logic [7:0] r2,
  output logic [1:0] s,
  output logic       halted
);

  localparam logic [1:0] S0 = 2'd0, S1 = 2'd1, S2 = 2'd2;

  assign halted = (s == S2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s  <= S0;
      r1 <= '0;
      r2 <= '0;
    end else if (load) begin
      s  <= S0;
      r1 <= r1_init;
      r2 <= r2_init;
    end else if (en) begin
      unique case (s)
        S0: begin
          r1 <= r1 - 8'd1;
          r2 <= r2 | (8'd1 << b2);
          s  <= S1;
        end
        S1: s <= r1[b1] ? S0 : S2;
        default: begin
          r2 <= r2 & ~(8'd1 << b2);
          s  <= S2;
        end
      endcase
    end
  end

endmodule
