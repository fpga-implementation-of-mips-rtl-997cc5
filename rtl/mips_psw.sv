// mips_psw: 3-bit program status word (zero, carry, negative).
//
// Loads the ALU flags on the rising clock edge when the instruction in the execute stage
// asks for a flag update (its control word's set_flags bit), holds them otherwise, and
// clears them on the synchronous active-high reset. The decoder reads the stored value to
// resolve conditional branches, so a branch sees the flags of instructions that have left
// the execute stage: one instruction must separate a flag-setting instruction from the
// branch that tests it (the pipeline has no interlock for this). Width follows the
// processor description; the bit assignment is this design's own (mips_pkg::psw_t).
module mips_psw
  import mips_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic we,
  input  psw_t flags_in,
  output psw_t psw
);

  always_ff @(posedge clk) begin
    if (rst)     psw <= '0;
    else if (we) psw <= flags_in;
  end

endmodule
