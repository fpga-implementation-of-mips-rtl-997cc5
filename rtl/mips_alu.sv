// mips_alu: 8-bit arithmetic and logic unit of the execute stage.
//
// Purely combinational. The 12-bit control word (mips_pkg::alu_ctrl_t) carries a one-hot
// operation select, an invert-B bit and a flag-update bit; the operation set (add,
// subtract, multiply, AND, OR, XOR, NOT, shifts, pass) and the 12-bit control width follow
// the processor description, the encoding inside the word is this design's own.
// Subtraction is A + ~B + carry_in with carry_in = 1 from the carry-select multiplexer.
//
// Flags: z = result is zero, n = result bit 7, c = carry out of an add, borrow of a
// subtract (no carry out), any non-zero bit in the high byte of the 16-bit product for a
// multiply, the bit shifted out for a shift, 0 otherwise.
module mips_alu
  import mips_pkg::*;
(
  input  alu_ctrl_t ctrl,
  input  data_t     a,
  input  data_t     b,
  input  logic      carry_in,
  output data_t     y,
  output psw_t      flags
);

  logic [DATA_W:0]     sum;
  logic [2*DATA_W-1:0] prod;
  data_t               b_eff;
  logic                c;

  always_comb begin
    b_eff = ctrl.inv_b ? ~b : b;
    sum   = {1'b0, a} + {1'b0, b_eff} + {{DATA_W{1'b0}}, carry_in};
    prod  = a * b;
    y     = '0;
    c     = 1'b0;
    unique case (ctrl.op)
      ALU_ADD:   begin y = sum[DATA_W-1:0]; c = sum[DATA_W] ^ ctrl.inv_b; end
      ALU_MUL:   begin y = prod[DATA_W-1:0]; c = |prod[2*DATA_W-1:DATA_W]; end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOT:   y = ~a;
      ALU_SHL:   begin y = {a[DATA_W-2:0], 1'b0}; c = a[DATA_W-1]; end
      ALU_SHR:   begin y = {1'b0, a[DATA_W-1:1]}; c = a[0]; end
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
    flags.z = (y == '0);
    flags.n = y[DATA_W-1];
    flags.c = c;
  end

endmodule
