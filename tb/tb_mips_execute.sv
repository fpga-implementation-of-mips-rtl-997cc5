// tb_mips_execute: self-checking test of the execute stage. Stage-II words are built here
// for add, subtract, multiply, compare, logic, load and store, with random operands,
// random forward selects and a random write-back value. Expected result, write-back
// fields, PSW and RAM contents come from a reference model in the test bench.
module tb_mips_execute;
  import mips_pkg::*;

  logic    clk = 0, rst = 1;
  stage2_t s2;
  data_t   wb_result, alu_out;
  stage3_t s3_next;
  psw_t    psw, m_psw;
  data_t   ram [256];
  int      checks = 0, failures = 0, n_fwd = 0, n_ld = 0, n_st = 0;

  mips_execute dut (.clk(clk), .rst(rst), .s2(s2), .wb_result(wb_result), .s3_next(s3_next),
                    .alu_out(alu_out), .psw(psw));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned a, b, y, kind, full;
    logic        c, setf;
    s2 = '0; s2.ctrl.alu.op = ALU_PASSA; wb_result = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    foreach (ram[i]) ram[i] = '0;
    m_psw = '0;
    for (int i = 0; i < 3000; i++) begin
      kind = $urandom % 8;
      s2 = '0;
      s2.a = 8'($urandom); s2.b = 8'($urandom); s2.addr = 8'($urandom % 16);
      s2.dest = 3'($urandom);
      s2.ctrl.fwd_a = ($urandom % 3 == 0);
      s2.ctrl.fwd_b = ($urandom % 3 == 0);
      wb_result = 8'($urandom);
      a = s2.ctrl.fwd_a ? wb_result : s2.a;
      b = s2.ctrl.fwd_b ? wb_result : s2.b;
      c = 0; setf = 1;
      case (kind)
        0: begin s2.ctrl.alu = '{1'b1, 1'b0, ALU_ADD}; s2.ctrl.reg_we = 1;
                 full = a + b; y = full & 255; c = full[8]; end
        1: begin s2.ctrl.alu = '{1'b1, 1'b1, ALU_ADD}; s2.ctrl.carry_sel = 1; s2.ctrl.reg_we = 1;
                 y = (a - b) & 255; c = (a < b); end
        2: begin s2.ctrl.alu = '{1'b1, 1'b0, ALU_MUL}; s2.ctrl.reg_we = 1;
                 full = a * b; y = full & 255; c = (full > 255); end
        3: begin s2.ctrl.alu = '{1'b1, 1'b1, ALU_ADD}; s2.ctrl.carry_sel = 1;
                 y = (a - b) & 255; c = (a < b); end
        4: begin s2.ctrl.alu = '{1'b1, 1'b0, ALU_XOR}; s2.ctrl.reg_we = 1; y = a ^ b; end
        5: begin s2.ctrl.alu = '{1'b0, 1'b0, ALU_PASSB}; s2.ctrl.reg_we = 1; s2.ctrl.mem_rd = 1;
                 y = ram[s2.addr]; setf = 0; n_ld++; end
        6: begin s2.ctrl.alu = '{1'b0, 1'b0, ALU_PASSA}; s2.ctrl.mem_we = 1; y = a; setf = 0; n_st++; end
        default: begin s2.ctrl.alu = '{1'b0, 1'b0, ALU_PASSB}; s2.ctrl.reg_we = 1; s2.ctrl.b_imm = 1;
                 y = b; setf = 0; end
      endcase
      if (s2.ctrl.fwd_a || s2.ctrl.fwd_b) n_fwd++;
      #1;
      checks += 4;
      if (alu_out !== data_t'(y)) begin failures++; $display("FAIL kind %0d y=%02h expected %02h", kind, alu_out, y); end
      if (s3_next.result !== data_t'(y)) begin failures++; $display("FAIL s3 result"); end
      if (s3_next.dest !== s2.dest) begin failures++; $display("FAIL s3 dest"); end
      if (s3_next.we !== s2.ctrl.reg_we) begin failures++; $display("FAIL s3 we"); end
      @(posedge clk);
      if (setf) m_psw = '{n: y[7], c: c, z: (y == 0)};
      if (kind == 6) ram[s2.addr] = data_t'(a);
      @(negedge clk);
      checks++;
      if (psw !== m_psw) begin failures++; $display("FAIL kind %0d psw=%b expected %b", kind, psw, m_psw); end
    end
    checks += 3;
    if (n_fwd == 0) begin failures++; $display("FAIL no forwarding"); end
    if (n_ld == 0)  begin failures++; $display("FAIL no load"); end
    if (n_st == 0)  begin failures++; $display("FAIL no store"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
