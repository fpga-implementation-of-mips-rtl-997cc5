// mips_control: instruction decoder (control unit) of the decode stage.
//
// Combinational. Splits the 24-bit instruction into opcode, register A, register B and
// the address/immediate field, and turns the opcode into the control word the later
// stages use (mips_pkg::ctrl_t): the 12-bit ALU control, the carry-in select, immediate
// and RAM-data operand selects, register and memory write enables and the branch
// decision. Its inputs are the instruction, the PSW and the destination of the
// instruction now in execute (exe_dest / exe_we): when that destination is one of this
// instruction's source registers, the matching forward select is set, so the execute
// stage takes the operand from the write-back register instead of the stale value read
// here. Conditional branches test the stored PSW. The inputs follow the decoder of the
// processor's block diagram; the opcode map beyond ADD, SUB, MUL and LDI is this design's
// own (see mips_pkg). Unknown opcodes decode as NOP.
module mips_control
  import mips_pkg::*;
(
  input  instr_t instr,
  input  psw_t   psw,
  input  raddr_t exe_dest,   // destination of the instruction in execute
  input  logic   exe_we,     // ... and whether it writes a register
  output ctrl_t  ctrl,
  output raddr_t ra,
  output raddr_t rb,
  output pc_t    addr        // address / immediate field (8 used bits)
);

  instr_fields_t f;
  logic          uses_b_reg;

  always_comb begin
    f    = instr_fields_t'(instr);
    ra   = f.ra;
    rb   = f.rb;
    addr = f.addr;

    ctrl            = '0;
    ctrl.alu.op     = ALU_PASSA;
    uses_b_reg      = 1'b0;

    unique case (f.opcode)
      OPC_ADD:  begin ctrl.alu = '{1'b1, 1'b0, ALU_ADD}; ctrl.reg_we = 1'b1; uses_b_reg = 1'b1; end
      OPC_SUB:  begin ctrl.alu = '{1'b1, 1'b1, ALU_ADD}; ctrl.carry_sel = 1'b1;
                      ctrl.reg_we = 1'b1; uses_b_reg = 1'b1; end
      OPC_MUL:  begin ctrl.alu = '{1'b1, 1'b0, ALU_MUL}; ctrl.reg_we = 1'b1; uses_b_reg = 1'b1; end
      OPC_AND:  begin ctrl.alu = '{1'b1, 1'b0, ALU_AND}; ctrl.reg_we = 1'b1; uses_b_reg = 1'b1; end
      OPC_OR:   begin ctrl.alu = '{1'b1, 1'b0, ALU_OR};  ctrl.reg_we = 1'b1; uses_b_reg = 1'b1; end
      OPC_XOR:  begin ctrl.alu = '{1'b1, 1'b0, ALU_XOR}; ctrl.reg_we = 1'b1; uses_b_reg = 1'b1; end
      OPC_NOT:  begin ctrl.alu = '{1'b1, 1'b0, ALU_NOT}; ctrl.reg_we = 1'b1; end
      OPC_SHL:  begin ctrl.alu = '{1'b1, 1'b0, ALU_SHL}; ctrl.reg_we = 1'b1; end
      OPC_SHR:  begin ctrl.alu = '{1'b1, 1'b0, ALU_SHR}; ctrl.reg_we = 1'b1; end
      OPC_CMP:  begin ctrl.alu = '{1'b1, 1'b1, ALU_ADD}; ctrl.carry_sel = 1'b1; uses_b_reg = 1'b1; end
      OPC_ADDI: begin ctrl.alu = '{1'b1, 1'b0, ALU_ADD}; ctrl.reg_we = 1'b1; ctrl.b_imm = 1'b1; end
      OPC_MOV:  begin ctrl.alu = '{1'b0, 1'b0, ALU_PASSB}; ctrl.reg_we = 1'b1; uses_b_reg = 1'b1; end
      OPC_LDI:  begin ctrl.alu = '{1'b0, 1'b0, ALU_PASSB}; ctrl.reg_we = 1'b1; ctrl.b_imm = 1'b1; end
      OPC_LD:   begin ctrl.alu = '{1'b0, 1'b0, ALU_PASSB}; ctrl.reg_we = 1'b1; ctrl.mem_rd = 1'b1; end
      OPC_ST:   begin ctrl.alu = '{1'b0, 1'b0, ALU_PASSA}; ctrl.mem_we = 1'b1; end
      OPC_JMP:  ctrl.branch = 1'b1;
      OPC_JZ:   ctrl.branch = psw.z;
      OPC_JNZ:  ctrl.branch = !psw.z;
      OPC_JC:   ctrl.branch = psw.c;
      OPC_JNC:  ctrl.branch = !psw.c;
      OPC_JN:   ctrl.branch = psw.n;
      default:  ;  // NOP and unused opcodes
    endcase

    // Operand forwarding from the instruction one stage ahead
    ctrl.fwd_a = exe_we && (exe_dest == f.ra);
    ctrl.fwd_b = exe_we && (exe_dest == f.rb) && uses_b_reg;
  end

endmodule
