// mips_pkg: types and constants shared by the 4-stage 8-bit RISC pipeline.
//
// Instruction word (24 bit):
//   [23:16] opcode   [15:13] register A   [12:10] register B   [9:0] address/immediate
// Only the low 8 bits of the 10-bit address field are used (8-bit PC, 256-entry memories);
// the two upper bits are reserved. Register A is both a source and the destination.
//
// Opcodes: ADD 0x01, SUB 0x05, MUL 0x09, LDI 0x11 and NOP 0x00 are the values the
// design is demonstrated with; the rest of the opcode map (logic, shifts, moves, loads,
// stores, jumps) is this design's own choice and follows the same pattern: bit pair [1:0]
// selects the class (01 ALU, 10 memory, 11 branch) and bits [7:2] the operation.
//
// PSW bit order: [0] Z (zero), [1] C (carry / borrow), [2] N (bit 7 of the result).
//
// The ALU is steered by a 12-bit control word: a one-hot 10-bit operation select, an
// invert-B bit (subtract) and a flag-update bit.
package mips_pkg;

  localparam int unsigned DATA_W  = 8;   // data path width
  localparam int unsigned INSTR_W = 24;  // instruction width
  localparam int unsigned PC_W    = 8;   // program counter / memory index width
  localparam int unsigned ADDR_W  = 10;  // address field of the instruction
  localparam int unsigned NREGS   = 8;   // general purpose registers
  localparam int unsigned RADDR_W = 3;   // register address width

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [PC_W-1:0]    pc_t;
  typedef logic [RADDR_W-1:0] raddr_t;

  // Opcodes
  typedef enum logic [7:0] {
    OPC_NOP  = 8'h00,
    OPC_ADD  = 8'h01,  // A = A + B
    OPC_SUB  = 8'h05,  // A = A - B
    OPC_MUL  = 8'h09,  // A = low byte of A * B
    OPC_AND  = 8'h0D,  // A = A & B
    OPC_LDI  = 8'h11,  // A = imm8
    OPC_OR   = 8'h15,  // A = A | B
    OPC_XOR  = 8'h19,  // A = A ^ B
    OPC_NOT  = 8'h1D,  // A = ~A
    OPC_SHL  = 8'h21,  // A = A << 1, C = old bit 7
    OPC_SHR  = 8'h25,  // A = A >> 1, C = old bit 0
    OPC_MOV  = 8'h29,  // A = B
    OPC_CMP  = 8'h2D,  // flags of A - B, no write
    OPC_ADDI = 8'h31,  // A = A + imm8
    OPC_LD   = 8'h02,  // A = RAM[addr8]
    OPC_ST   = 8'h06,  // RAM[addr8] = A
    OPC_JMP  = 8'h03,  // PC = addr8
    OPC_JZ   = 8'h07,  // if Z
    OPC_JNZ  = 8'h0B,  // if !Z
    OPC_JC   = 8'h0F,  // if C
    OPC_JNC  = 8'h13,  // if !C
    OPC_JN   = 8'h17   // if N
  } opcode_e;

  typedef struct packed {
    logic [7:0]  opcode;
    raddr_t      ra;
    raddr_t      rb;
    logic [ADDR_W-PC_W-1:0] addr_hi;  // reserved
    pc_t         addr;     // address / immediate
  } instr_fields_t;

  // PSW
  typedef struct packed {
    logic n;
    logic c;
    logic z;
  } psw_t;

  // One-hot ALU operation select
  typedef enum logic [9:0] {
    ALU_ADD   = 10'b00_0000_0001,  // A + (B or ~B) + carry_in
    ALU_MUL   = 10'b00_0000_0010,
    ALU_AND   = 10'b00_0000_0100,
    ALU_OR    = 10'b00_0000_1000,
    ALU_XOR   = 10'b00_0001_0000,
    ALU_NOT   = 10'b00_0010_0000,
    ALU_SHL   = 10'b00_0100_0000,
    ALU_SHR   = 10'b00_1000_0000,
    ALU_PASSA = 10'b01_0000_0000,
    ALU_PASSB = 10'b10_0000_0000
  } alu_op_e;

  // 12-bit ALU control word
  typedef struct packed {
    logic    set_flags;  // write the PSW
    logic    inv_b;      // use ~B in the adder (subtract)
    alu_op_e op;
  } alu_ctrl_t;

  // Everything the decoder produces for one instruction
  typedef struct packed {
    alu_ctrl_t  alu;
    logic       carry_sel;  // carry_in = 1 (subtract) when set, else 0
    logic       b_imm;      // B operand is the 8-bit immediate
    logic       mem_rd;     // B operand is RAM[addr]
    logic       mem_we;     // RAM[addr] = A
    logic       reg_we;     // write the result to register A
    logic       fwd_a;      // take A from the write-back register
    logic       fwd_b;      // take B from the write-back register
    logic       branch;     // branch taken: next fetch address is addr
  } ctrl_t;

  // Stage-II register: decode -> execute
  typedef struct packed {
    ctrl_t  ctrl;
    data_t  a;      // register A contents
    data_t  b;      // register B contents or immediate
    pc_t    addr;   // data memory address
    raddr_t dest;   // destination register
  } stage2_t;

  // Stage-III register: execute -> write back (12 bits: we, dest, result)
  typedef struct packed {
    logic   we;
    raddr_t dest;
    data_t  result;
  } stage3_t;

  function automatic instr_t mk_instr(logic [7:0] opc, raddr_t ra, raddr_t rb, logic [7:0] addr);
    return {opc, ra, rb, 2'b00, addr};
  endfunction

  // Power-up contents of the code memory: the add / subtract / multiply demonstration
  // program (R1 = 5, R2 = 6, R1 += R2, R1 -= R2, R1 *= R2, then NOPs).
  function automatic instr_t demo_program(int unsigned idx);
    case (idx)
      0:       return 24'h112005;  // LDI R1, 5
      1:       return 24'h114006;  // LDI R2, 6
      2:       return 24'h012800;  // ADD R1, R2   -> 0x0B
      3:       return 24'h052800;  // SUB R1, R2   -> 0x05
      4:       return 24'h092800;  // MUL R1, R2   -> 0x1E
      default: return 24'h000000;  // NOP
    endcase
  endfunction

endpackage
