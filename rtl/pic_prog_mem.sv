// pic_prog_mem: program memory (EPROM) of the microcontroller.
//
// WORDS words of 14 bits, addressed by the 13-bit program counter; an
// address beyond WORDS wraps (only the low address bits are used).  Reads
// are asynchronous: the core holds the fetch address stable from Q1 and
// latches the word into the instruction register at Q5.  The EPROM is
// programmed through the write port (`prog_we`), which stands in for the
// device's programming mode; it is not meant to be written while the core
// runs.  The 14-bit word and 13-bit address are the architecture's; the
// size of 1024 words and the write port are this design's choices.
module pic_prog_mem
  import pic_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic   clk,
  input  pc_t    addr,
  output instr_t rdata,
  input  logic   prog_we,
  input  pc_t    prog_addr,
  input  instr_t prog_wdata
);

  localparam int unsigned AW = $clog2(WORDS);

  instr_t mem [WORDS];

  assign rdata = mem[addr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr[AW-1:0]] <= prog_wdata;
  end

endmodule
