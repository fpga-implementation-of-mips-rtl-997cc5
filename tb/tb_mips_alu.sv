// tb_mips_alu: self-checking test of the ALU.
// Drives every operation with random and corner operands and compares result and flags
// with a reference computed here from plain integer arithmetic.
module tb_mips_alu;
  import mips_pkg::*;

  alu_ctrl_t ctrl;
  data_t     a, b, y;
  logic      cin;
  psw_t      flags;
  int        checks = 0, failures = 0;

  mips_alu dut (.ctrl(ctrl), .a(a), .b(b), .carry_in(cin), .y(y), .flags(flags));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string name, input int unsigned ea, eb, input logic inv, c_in,
                       input alu_op_e op);
    int unsigned ey, ec, full;
    ctrl = '{1'b1, inv, op};
    a = data_t'(ea); b = data_t'(eb); cin = c_in;
    #1;
    ec = 0;
    case (op)
      ALU_ADD: begin
        if (!inv) begin full = ea + eb + c_in; ey = full & 255; ec = (full >> 8) & 1; end
        else begin ey = (ea - eb - (c_in ? 0 : 1)) & 255; ec = (ea < eb + (c_in ? 0 : 1)) ? 1 : 0; end
      end
      ALU_MUL: begin full = ea * eb; ey = full & 255; ec = (full > 255) ? 1 : 0; end
      ALU_AND: ey = ea & eb;
      ALU_OR:  ey = ea | eb;
      ALU_XOR: ey = ea ^ eb;
      ALU_NOT: ey = (~ea) & 255;
      ALU_SHL: begin ey = (ea << 1) & 255; ec = (ea >> 7) & 1; end
      ALU_SHR: begin ey = ea >> 1; ec = ea & 1; end
      ALU_PASSA: ey = ea;
      default: ey = eb;
    endcase
    checks++;
    if (y !== data_t'(ey) || flags.c !== ec[0] || flags.z !== (ey == 0) || flags.n !== ey[7]) begin
      failures++;
      $display("FAIL %s a=%02h b=%02h inv=%0d cin=%0d: y=%02h c=%0d z=%0d n=%0d, expected y=%02h c=%0d",
               name, ea, eb, inv, c_in, y, flags.c, flags.z, flags.n, ey, ec);
    end
  endtask

  initial begin
    // values from the demonstration program
    check("add", 5, 6, 0, 0, ALU_ADD);     // 0x0B
    check("sub", 8'h0b, 6, 1, 1, ALU_ADD); // 0x05
    check("mul", 5, 6, 0, 0, ALU_MUL);     // 0x1E
    // corners
    check("add_carry", 8'hff, 1, 0, 0, ALU_ADD);
    check("sub_borrow", 3, 4, 1, 1, ALU_ADD);
    check("sub_zero", 9, 9, 1, 1, ALU_ADD);
    check("mul_ovf", 8'h10, 8'h10, 0, 0, ALU_MUL);
    check("shl", 8'h81, 0, 0, 0, ALU_SHL);
    check("shr", 8'h81, 0, 0, 0, ALU_SHR);
    for (int i = 0; i < 400; i++) begin
      int unsigned ra, rb;
      ra = $urandom % 256; rb = $urandom % 256;
      check("add", ra, rb, 0, 0, ALU_ADD);
      check("sub", ra, rb, 1, 1, ALU_ADD);
      check("mul", ra, rb, 0, 0, ALU_MUL);
      check("and", ra, rb, 0, 0, ALU_AND);
      check("or",  ra, rb, 0, 0, ALU_OR);
      check("xor", ra, rb, 0, 0, ALU_XOR);
      check("not", ra, rb, 0, 0, ALU_NOT);
      check("shl", ra, rb, 0, 0, ALU_SHL);
      check("shr", ra, rb, 0, 0, ALU_SHR);
      check("passa", ra, rb, 0, 0, ALU_PASSA);
      check("passb", ra, rb, 0, 0, ALU_PASSB);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
