// mips_decode: decode / operand-fetch stage and the Stage-II pipeline register.
//
// The control unit decodes the instruction held in Stage I while the register file reads
// registers A and B. The B operand multiplexer replaces register B with the 8-bit
// immediate for LDI and ADDI. On the rising edge the control word, both operands, the
// data-memory address and the destination register are captured in the Stage-II register
// for the execute stage. The destination of the instruction already in Stage II is fed
// back to the control unit, which sets the forward selects when the new instruction
// reads that register. The taken-branch signal and its target go straight back to the
// fetch stage in the same cycle. The register file's write port is driven by the
// write-back stage. Synchronous active-high reset loads a NOP into Stage II.
module mips_decode
  import mips_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  instr_t  instr,       // Stage-I instruction
  input  psw_t    psw,         // program status word
  input  stage3_t wb,          // write-back register (register file write port)
  output stage2_t s2,          // Stage-II register
  output logic    branch,      // taken branch
  output pc_t     target,      // branch target
  output data_t   regs [NREGS] // register contents, for observation
);

  ctrl_t  ctrl;
  raddr_t ra, rb;
  pc_t    addr;
  data_t  ra_data, rb_data;
  stage2_t s2_next;

  mips_control u_cu (
    .instr    (instr),
    .psw      (psw),
    .exe_dest (s2.dest),
    .exe_we   (s2.ctrl.reg_we),
    .ctrl     (ctrl),
    .ra       (ra),
    .rb       (rb),
    .addr     (addr)
  );

  mips_regfile #(.N(NREGS)) u_rf (
    .clk     (clk),
    .rst     (rst),
    .ra_addr (ra),
    .rb_addr (rb),
    .ra_data (ra_data),
    .rb_data (rb_data),
    .we      (wb.we),
    .w_addr  (wb.dest),
    .w_data  (wb.result),
    .regs    (regs)
  );

  always_comb begin
    s2_next.ctrl = ctrl;
    s2_next.a    = ra_data;
    s2_next.b    = ctrl.b_imm ? data_t'(addr) : rb_data;  // immediate multiplexer
    s2_next.addr = addr;
    s2_next.dest = ra;
    branch       = ctrl.branch;
    target       = addr;
  end

  always_ff @(posedge clk) begin
    if (rst) s2 <= '0;
    else     s2 <= s2_next;
  end

endmodule
