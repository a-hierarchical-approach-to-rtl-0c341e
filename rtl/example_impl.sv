// example_impl: the example five-instruction assembly program as a state
// machine with one state per instruction (pc = 0..4).
//   0 DECR R1        R1 <= R1 - 1
//   1 SETB R2.b2     set bit b2 of R2
//   2 SKBZ R1.b1     if bit b1 of R1 is 0 go to 4, else go to 3
//   3 GOTO START     go to 0
//   4 RESETB R2.b2   clear bit b2 of R2; the program stays at 4 (`halted`)
// `pc` is also the synchronisation output: the specification machine
// example_spec does the work of instructions 0 and 1 in its state S0 and
// the test of instruction 2 in S1.  `load` writes R1/R2 and restarts at 0;
// one instruction runs per clock while `en` is high.  Program, states and
// branch conditions are the example's; register width, `load` and `en`
// are this design's choices.
module example_impl (
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
  output logic [2:0] pc,
  output logic       halted
);

  assign halted = (pc == 3'd4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0;
      r1 <= '0;
      r2 <= '0;
    end else if (load) begin
      pc <= '0;
      r1 <= r1_init;
      r2 <= r2_init;
    end else if (en) begin
      unique case (pc)
        3'd0: begin r1 <= r1 - 8'd1;          pc <= 3'd1; end
        3'd1: begin r2 <= r2 | (8'd1 << b2);  pc <= 3'd2; end
        3'd2: pc <= r1[b1] ? 3'd3 : 3'd4;
        3'd3: pc <= 3'd0;
        default: begin r2 <= r2 & ~(8'd1 << b2); pc <= 3'd4; end
      endcase
    end
  end

endmodule
