// tb_mips_decode: self-checking test of the decode stage. Random instructions are decoded
// while the write-back port writes random registers; a register model in the test bench
// predicts the Stage-II operands (with the same-cycle write visible), the immediate
// substitution, the destination and the forward selects, which depend on the instruction
// captured one cycle earlier.
module tb_mips_decode;
  import mips_pkg::*;

  logic    clk = 0, rst = 1;
  instr_t  instr;
  psw_t    psw;
  stage3_t wb;
  stage2_t s2;
  logic    branch;
  pc_t     target;
  data_t   regs [NREGS];
  data_t   model [NREGS];
  int      checks = 0, failures = 0, fwd_seen = 0, imm_seen = 0;

  mips_decode dut (.clk(clk), .rst(rst), .instr(instr), .psw(psw), .wb(wb), .s2(s2),
                   .branch(branch), .target(target), .regs(regs));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] OPS [8] = '{8'h01, 8'h05, 8'h11, 8'h31, 8'h29, 8'h02, 8'h06, 8'h00};

  initial begin
    logic       prev_we;
    raddr_t     prev_dest;
    data_t      ea, eb;
    logic [7:0] opc;
    logic       imm, we, rdb;
    instr = '0; psw = '0; wb = '0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (s2 !== '0) begin failures++; $display("FAIL reset s2"); end
    rst = 0;
    foreach (model[i]) model[i] = '0;
    prev_we = 0; prev_dest = 0;
    for (int i = 0; i < 2000; i++) begin
      opc   = OPS[$urandom % 8];
      instr = {opc, 3'($urandom), 3'($urandom), 2'b00, 8'($urandom)};
      wb    = stage3_t'($urandom);
      psw   = 3'($urandom);
      imm   = (opc == 8'h11 || opc == 8'h31);
      rdb   = (opc == 8'h01 || opc == 8'h05 || opc == 8'h29);
      we    = (opc != 8'h06 && opc != 8'h00);
      ea    = (wb.we && wb.dest == instr[15:13]) ? wb.result : model[instr[15:13]];
      eb    = imm ? instr[7:0] : ((wb.we && wb.dest == instr[12:10]) ? wb.result : model[instr[12:10]]);
      #1;
      checks += 2;
      if (branch !== 1'b0) begin failures++; $display("FAIL branch for opc %02h", opc); end
      if (target !== instr[7:0]) begin failures++; $display("FAIL target"); end
      @(posedge clk);
      if (wb.we) model[wb.dest] = wb.result;
      @(negedge clk);
      checks += 7;
      if (s2.a !== ea) begin failures++; $display("FAIL a=%02h expected %02h", s2.a, ea); end
      if (s2.b !== eb) begin failures++; $display("FAIL b=%02h expected %02h (opc %02h)", s2.b, eb, opc); end
      if (s2.addr !== instr[7:0]) begin failures++; $display("FAIL addr"); end
      if (s2.dest !== instr[15:13]) begin failures++; $display("FAIL dest"); end
      if (s2.ctrl.reg_we !== we) begin failures++; $display("FAIL reg_we opc %02h", opc); end
      if (s2.ctrl.fwd_a !== (prev_we && prev_dest == instr[15:13])) begin failures++; $display("FAIL fwd_a"); end
      if (s2.ctrl.fwd_b !== (prev_we && prev_dest == instr[12:10] && rdb)) begin failures++; $display("FAIL fwd_b"); end
      if (s2.ctrl.fwd_a) fwd_seen++;
      if (imm) imm_seen++;
      prev_we = we; prev_dest = instr[15:13];
      for (int r = 0; r < NREGS; r++) begin
        checks++;
        if (regs[r] !== model[r]) begin failures++; $display("FAIL R%0d", r); end
      end
    end
    // a taken jump reports its target combinationally
    instr = {8'h03, 16'h00_5A};
    #1;
    checks += 2;
    if (branch !== 1'b1) begin failures++; $display("FAIL jump not taken"); end
    if (target !== 8'h5A) begin failures++; $display("FAIL jump target %02h", target); end
    checks += 2;
    if (fwd_seen == 0) begin failures++; $display("FAIL forwarding never set"); end
    if (imm_seen == 0) begin failures++; $display("FAIL immediate never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
