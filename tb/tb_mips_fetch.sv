// tb_mips_fetch: self-checking test of the fetch stage. A code memory model in the test
// bench returns a distinct word for every address; random taken branches are injected.
// Checks the fetch address (target on a branch, PC otherwise), the PC update (fetch
// address + 1) and that the Stage-I register holds the word fetched in the previous
// cycle, i.e. one instruction per clock and no lost cycle on a branch.
module tb_mips_fetch;
  import mips_pkg::*;

  logic   clk = 0, rst = 1, branch = 0;
  pc_t    target = 0, imem_addr, pc;
  instr_t imem_rdata, instr;
  pc_t    m_pc;
  instr_t m_instr;
  int     checks = 0, failures = 0, branches = 0;

  mips_fetch dut (.clk(clk), .rst(rst), .branch(branch), .target(target), .imem_addr(imem_addr),
                  .imem_rdata(imem_rdata), .pc(pc), .instr(instr));

  // code memory model: word = {0xA5, address, ~address}
  assign imem_rdata = {8'hA5, imem_addr, ~imem_addr};

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    checks += 2;
    if (pc !== 8'h00) begin failures++; $display("FAIL reset pc=%02h", pc); end
    if (instr !== 24'h0) begin failures++; $display("FAIL reset instr=%06h", instr); end
    rst = 0;
    m_pc = 0;
    for (int i = 0; i < 1000; i++) begin
      pc_t fa;
      branch = ($urandom % 5 == 0);
      target = 8'($urandom);
      #1;
      fa = branch ? target : m_pc;
      checks++;
      if (imem_addr !== fa) begin failures++; $display("FAIL fetch addr %02h expected %02h", imem_addr, fa); end
      if (branch) branches++;
      @(posedge clk);
      m_pc    = fa + 8'd1;
      m_instr = {8'hA5, fa, ~fa};
      @(negedge clk);
      checks += 2;
      if (pc !== m_pc) begin failures++; $display("FAIL pc %02h expected %02h", pc, m_pc); end
      if (instr !== m_instr) begin failures++; $display("FAIL instr %06h expected %06h", instr, m_instr); end
    end
    checks++;
    if (branches == 0) begin failures++; $display("FAIL no branch exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
