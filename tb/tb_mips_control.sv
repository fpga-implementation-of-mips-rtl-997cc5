// tb_mips_control: self-checking test of the instruction decoder. For every opcode the
// expected control bits are written out here as a table (independent of the decoder's
// case statement); register fields, immediate, forwarding selects and the branch decision
// against every PSW value are checked for random instruction words.
module tb_mips_control;
  import mips_pkg::*;

  instr_t instr;
  psw_t   psw;
  raddr_t exe_dest, ra, rb;
  logic   exe_we;
  ctrl_t  ctrl;
  pc_t    addr;
  int     checks = 0, failures = 0;

  mips_control dut (.instr(instr), .psw(psw), .exe_dest(exe_dest), .exe_we(exe_we),
                    .ctrl(ctrl), .ra(ra), .rb(rb), .addr(addr));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {set_flags, inv_b, carry_sel, b_imm, mem_rd, mem_we, reg_we, uses_b}, op
  typedef struct {
    logic [7:0] opc;
    logic [7:0] bits;
    alu_op_e    op;
  } row_t;

  row_t tbl [15] = '{
    '{8'h01, 8'b1000_0011, ALU_ADD},
    '{8'h05, 8'b1110_0011, ALU_ADD},
    '{8'h09, 8'b1000_0011, ALU_MUL},
    '{8'h0D, 8'b1000_0011, ALU_AND},
    '{8'h15, 8'b1000_0011, ALU_OR},
    '{8'h19, 8'b1000_0011, ALU_XOR},
    '{8'h1D, 8'b1000_0010, ALU_NOT},
    '{8'h21, 8'b1000_0010, ALU_SHL},
    '{8'h25, 8'b1000_0010, ALU_SHR},
    '{8'h29, 8'b0000_0011, ALU_PASSB},
    '{8'h2D, 8'b1110_0001, ALU_ADD},
    '{8'h31, 8'b1001_0010, ALU_ADD},
    '{8'h11, 8'b0001_0010, ALU_PASSB},
    '{8'h02, 8'b0000_1010, ALU_PASSB},
    '{8'h06, 8'b0000_0100, ALU_PASSA}
  };

  function automatic logic exp_branch(logic [7:0] opc, psw_t p);
    case (opc)
      8'h03: return 1'b1;
      8'h07: return p.z;
      8'h0B: return !p.z;
      8'h0F: return p.c;
      8'h13: return !p.c;
      8'h17: return p.n;
      default: return 1'b0;
    endcase
  endfunction

  task automatic check_one(logic [7:0] opc);
    logic [7:0] bits;
    alu_op_e    op;
    logic       found, ub;
    found = 0; bits = '0; op = ALU_PASSA;
    foreach (tbl[k]) if (tbl[k].opc == opc) begin bits = tbl[k].bits; op = tbl[k].op; found = 1; end
    ub = bits[0];
    instr = {opc, 3'($urandom), 3'($urandom), 2'($urandom), 8'($urandom)};
    psw = 3'($urandom); exe_dest = 3'($urandom); exe_we = 1'($urandom);
    if ($urandom % 2) exe_dest = instr[15:13];
    if ($urandom % 2) exe_dest = instr[12:10];
    #1;
    checks += 12;
    if (ra !== instr[15:13] || rb !== instr[12:10] || addr !== instr[7:0]) begin
      failures++; $display("FAIL fields %06h", instr);
    end
    if (ctrl.alu.set_flags !== bits[7] || ctrl.alu.inv_b !== bits[6] || ctrl.carry_sel !== bits[5] ||
        ctrl.b_imm !== bits[4] || ctrl.mem_rd !== bits[3] || ctrl.mem_we !== bits[2] ||
        ctrl.reg_we !== bits[1]) begin
      failures++; $display("FAIL control bits opc=%02h", opc);
    end
    if (found && ctrl.alu.op !== op) begin failures++; $display("FAIL alu op opc=%02h", opc); end
    if (ctrl.fwd_a !== (exe_we && exe_dest == instr[15:13])) begin failures++; $display("FAIL fwd_a opc=%02h", opc); end
    if (ctrl.fwd_b !== (exe_we && exe_dest == instr[12:10] && ub)) begin failures++; $display("FAIL fwd_b opc=%02h", opc); end
    if (ctrl.branch !== exp_branch(opc, psw)) begin failures++; $display("FAIL branch opc=%02h psw=%b", opc, psw); end
  endtask

  initial begin
    for (int rep = 0; rep < 40; rep++)
      for (int o = 0; o < 256; o++) check_one(8'(o));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
