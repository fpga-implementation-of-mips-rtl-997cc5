// mips_top: four-stage pipelined 8-bit RISC processor.
//
// Stages: fetch (PC, incrementer, next-address multiplexer, 256 x 24 code memory,
// Stage-I instruction register) -> decode (control unit, 8 x 8 register file, immediate
// multiplexer, Stage-II register) -> execute (forward / RAM-data / carry multiplexers,
// ALU, PSW, 256 x 8 data RAM) -> write back (12-bit Stage-III register driving the
// register file). One instruction enters per clock; a result is written to its register
// at the end of the fourth cycle after the instruction's fetch edge.
//
// Hazards are handled without stalls: a result needed by the very next instruction is
// forwarded from the write-back register, one needed two instructions later passes
// through the register file's write-through, branches are resolved in decode and redirect
// the fetch of the same cycle (no cycle lost, nothing to cancel). The one software rule:
// a conditional branch tests the stored PSW, so it must not immediately follow the
// instruction whose flags it tests.
//
// Ports: clk, synchronous active-high rst; prog_* write the code memory (which powers up
// holding the add / subtract / multiply demonstration program); the rest are observation
// outputs (fetch address, Stage-I instruction, ALU output, PSW, register contents,
// write-back port).
module mips_top
  import mips_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   prog_we,
  input  pc_t    prog_addr,
  input  instr_t prog_data,
  output pc_t    pc,
  output instr_t instr,
  output data_t  alu_out,
  output psw_t   psw,
  output data_t  regs [NREGS],
  output logic   wb_we,
  output raddr_t wb_dest,
  output data_t  wb_data
);

  logic    branch;
  pc_t     target;
  pc_t     imem_addr;
  instr_t  imem_rdata;
  stage2_t s2;
  stage3_t s3_next, s3;

  mips_fetch u_fetch (
    .clk        (clk),
    .rst        (rst),
    .branch     (branch),
    .target     (target),
    .imem_addr  (imem_addr),
    .imem_rdata (imem_rdata),
    .pc         (pc),
    .instr      (instr)
  );

  mips_imem #(.DEPTH(1 << PC_W)) u_imem (
    .clk       (clk),
    .addr      (imem_addr),
    .rdata     (imem_rdata),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_data (prog_data)
  );

  mips_decode u_decode (
    .clk    (clk),
    .rst    (rst),
    .instr  (instr),
    .psw    (psw),
    .wb     (s3),
    .s2     (s2),
    .branch (branch),
    .target (target),
    .regs   (regs)
  );

  mips_execute u_execute (
    .clk       (clk),
    .rst       (rst),
    .s2        (s2),
    .wb_result (s3.result),
    .s3_next   (s3_next),
    .alu_out   (alu_out),
    .psw       (psw)
  );

  mips_writeback u_wb (
    .clk     (clk),
    .rst     (rst),
    .s3_next (s3_next),
    .s3      (s3)
  );

  assign wb_we   = s3.we;
  assign wb_dest = s3.dest;
  assign wb_data = s3.result;

endmodule
