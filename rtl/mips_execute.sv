// mips_execute: execute stage - operand multiplexers, ALU, PSW and data memory.
//
// Works on the instruction held in Stage II, combinationally within one cycle:
//   * forward multiplexers: operand A (and B) come from the write-back register instead
//     of Stage II when the decoder set fwd_a (fwd_b), which covers an instruction that
//     reads the result of the one just before it;
//   * RAM-data multiplexer: for a load, operand B is the data RAM word at the
//     instruction's address;
//   * carry-select multiplexer: carry_in is 1 for subtract/compare, 0 otherwise;
//   * the ALU produces the result and the flags.
// On the rising edge the PSW takes the flags (if the control word asks), a store writes
// operand A into the data RAM, and the write-back stage captures s3_next. Placing data
// memory and PSW in this stage follows the processor description; the multiplexer set
// follows its schematic instance names.
module mips_execute
  import mips_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  stage2_t s2,        // Stage-II register
  input  data_t   wb_result, // result held in the write-back register
  output stage3_t s3_next,   // to the write-back register
  output data_t   alu_out,   // ALU result, for observation
  output psw_t    psw        // program status word, to the decoder
);

  data_t a, b_fwd, b;
  data_t ram_rdata;
  logic  carry_in;
  data_t y;
  psw_t  flags;

  always_comb begin
    a        = s2.ctrl.fwd_a  ? wb_result : s2.a;   // Mux_rega_forward
    b_fwd    = s2.ctrl.fwd_b  ? wb_result : s2.b;   // Mux_regb_forward
    b        = s2.ctrl.mem_rd ? ram_rdata : b_fwd;  // Mux_regb_data
    carry_in = s2.ctrl.carry_sel ? 1'b1 : 1'b0;     // Mux_carry_select
  end

  mips_alu u_alu (
    .ctrl     (s2.ctrl.alu),
    .a        (a),
    .b        (b),
    .carry_in (carry_in),
    .y        (y),
    .flags    (flags)
  );

  mips_psw u_psw (
    .clk      (clk),
    .rst      (rst),
    .we       (s2.ctrl.alu.set_flags),
    .flags_in (flags),
    .psw      (psw)
  );

  mips_dmem #(.DEPTH(1 << PC_W)) u_ram (
    .clk   (clk),
    .we    (s2.ctrl.mem_we),
    .addr  (s2.addr),
    .wdata (a),
    .rdata (ram_rdata)
  );

  always_comb begin
    s3_next.we     = s2.ctrl.reg_we;
    s3_next.dest   = s2.dest;
    s3_next.result = y;
    alu_out        = y;
  end

endmodule
