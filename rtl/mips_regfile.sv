// mips_regfile: 8 x 8-bit general purpose register file.
//
// Two combinational read ports and one write port, so an instruction can read both of its
// operands and another can write its result in the same clock cycle. The write happens on
// the rising edge; a read of the register being written in that cycle returns the new
// value (write-through), so an instruction in decode sees the result of the instruction
// that is in write back at the same time. This replaces writing on the opposite clock
// edge and is this design's own choice. All registers clear on the synchronous
// active-high reset. All eight values are also brought out for observation.
module mips_regfile
  import mips_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [$clog2(N)-1:0] ra_addr,
  input  logic [$clog2(N)-1:0] rb_addr,
  output data_t                ra_data,
  output data_t                rb_data,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] w_addr,
  input  data_t                w_data,
  output data_t                regs [N]
);

  data_t r [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++) r[i] <= '0;
    end else if (we) begin
      r[w_addr] <= w_data;
    end
  end

  always_comb begin
    ra_data = (we && w_addr == ra_addr) ? w_data : r[ra_addr];
    rb_data = (we && w_addr == rb_addr) ? w_data : r[rb_addr];
    for (int i = 0; i < int'(N); i++) regs[i] = r[i];
  end

endmodule
