// mips_imem: 256 x 24-bit code memory of the fetch stage.
//
// Combinational read: rdata is the instruction at addr in the same cycle, and the fetch
// stage captures it in its instruction register on the next rising edge. The memory
// powers up holding the add / subtract / multiply demonstration program
// (mips_pkg::demo_program). A write port (prog_we, prog_addr, prog_data), written on the
// rising edge, lets a test bench or a loader replace the program; the processor itself
// never writes it. The 256 x 24 size follows the processor description; the load port
// is this design's own addition.
module mips_imem
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output instr_t                   rdata,
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  instr_t                   prog_data
);

  instr_t mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = demo_program(i);
  end

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign rdata = mem[addr];

endmodule
