// mips_writeback: write-back stage - the 12-bit Stage-III result register.
//
// Captures the execute stage's result, destination register and write enable on the
// rising edge (8 + 3 + 1 = 12 bits). Its contents drive the register file's write port
// during the following cycle and are fed back to the execute stage's forward
// multiplexers. Synchronous active-high reset clears the write enable, the destination
// and the result. The 12-bit width matches the processor's schematic; the field split is
// this design's own reading of it.
module mips_writeback
  import mips_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  stage3_t s3_next,
  output stage3_t s3
);

  always_ff @(posedge clk) begin
    if (rst) s3 <= '0;
    else     s3 <= s3_next;
  end

endmodule
