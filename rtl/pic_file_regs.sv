// pic_file_regs: the general purpose part of the RAM file registers.
//
// COUNT 8-bit registers placed at file addresses BASE .. BASE+COUNT-1.  The
// 9-bit RAM address comes from the address MUX (direct address from the
// instruction, or the FSR for indirect access); only its low 7 bits select a
// register, so the registers appear at the same place in both banks.  `hit`
// tells the core that the address belongs to this RAM, so the core's data
// bus MUX can take `rdata`.  Read is asynchronous, write happens on the
// clock edge when `we` and `hit` are both high.  The count of 36 registers
// is the documented one; the base address 0x0C and the bank mirroring are
// this design's choices, taken from the PIC16C71 register map.
module pic_file_regs
  import pic_pkg::*;
#(
  parameter int unsigned COUNT = 36,
  parameter int unsigned BASE  = 12
) (
  input  logic       clk,
  input  logic [8:0] addr,
  input  logic       we,
  input  byte_t      wdata,
  output byte_t      rdata,
  output logic       hit
);

  byte_t ram [COUNT];
  logic [6:0] a7;
  localparam int unsigned IW = $clog2(COUNT);
  logic [IW-1:0] idx;

  assign a7  = addr[6:0];
  assign hit = (32'(a7) >= BASE) && (32'(a7) < BASE + COUNT);
  assign idx = IW'(a7 - 7'(BASE));
  assign rdata = hit ? ram[idx] : '0;

  always_ff @(posedge clk) begin
    if (we && hit) ram[idx] <= wdata;
  end

endmodule
