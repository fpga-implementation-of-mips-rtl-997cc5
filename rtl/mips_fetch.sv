// mips_fetch: fetch stage - program counter, incrementer, next-address multiplexer and
// the Stage-I instruction register.
//
// The multiplexer picks the fetch address: the branch target when the decoder reports a
// taken branch, the program counter otherwise. That address indexes the code memory
// (combinational read) and, incremented by one, becomes the next program counter. On the
// rising edge the instruction read from the code memory is captured in the Stage-I
// register. Because the branch is resolved while it sits in Stage I, the instruction
// fetched in that same cycle is already the target: a taken branch costs no cycle and no
// instruction behind it has to be cancelled. The arrangement of multiplexer, adder and
// PC follows the processor's block diagram; the zero-penalty branch timing is what that
// arrangement gives with a combinational code memory. Synchronous active-high reset puts
// the PC at 0 and a NOP (all zero) in the instruction register.
module mips_fetch
  import mips_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   branch,        // taken branch from the decoder
  input  pc_t    target,        // branch target
  output pc_t    imem_addr,     // fetch address to the code memory
  input  instr_t imem_rdata,    // instruction at imem_addr
  output pc_t    pc,            // program counter (next sequential address)
  output instr_t instr          // Stage-I instruction register
);

  pc_t fetch_addr;

  always_comb begin
    fetch_addr = branch ? target : pc;
    imem_addr  = fetch_addr;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc    <= '0;
      instr <= '0;
    end else begin
      pc    <= fetch_addr + pc_t'(1);
      instr <= imem_rdata;
    end
  end

endmodule
