// mips_dmem: 256 x 8-bit data RAM of the execute stage.
//
// Combinational read at addr, write of wdata on the rising clock edge when we is high, so
// a load that follows a store to the same address in the next cycle reads the stored
// value. The contents start at zero (initial values, as a block RAM would be
// initialised); the RAM has no reset. The depth follows the processor description; the
// read and write timing is this design's own choice.
module mips_dmem
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  data_t                    wdata,
  output data_t                    rdata
);

  data_t mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
