// tb_mips_imem: self-checking test of the 256 x 24 code memory: power-up contents are the
// demonstration program (checked against literal instruction words), and words written
// through the load port read back at their addresses.
module tb_mips_imem;
  import mips_pkg::*;

  logic   clk = 0, we = 0;
  pc_t    addr, paddr;
  instr_t rdata, pdata;
  instr_t model [256];
  int     checks = 0, failures = 0;

  mips_imem dut (.clk(clk), .addr(addr), .rdata(rdata), .prog_we(we), .prog_addr(paddr),
                 .prog_data(pdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 24'h000000;
    model[0] = 24'h112005; model[1] = 24'h114006; model[2] = 24'h012800;
    model[3] = 24'h052800; model[4] = 24'h092800;
    paddr = 0; pdata = 0;
    for (int i = 0; i < 256; i++) begin
      addr = pc_t'(i); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL power-up [%0d]=%06h expected %06h", i, rdata, model[i]); end
    end
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); paddr = 8'($urandom); pdata = 24'($urandom);
      addr = 8'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL read [%0d]=%06h expected %06h", addr, rdata, model[addr]); end
      @(posedge clk);
      if (we) model[paddr] = pdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 256; i++) begin
      addr = pc_t'(i); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL final [%0d]=%06h expected %06h", i, rdata, model[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
