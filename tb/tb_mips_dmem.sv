// tb_mips_dmem: self-checking test of the 256 x 8 data RAM: zero initial contents,
// random writes and reads against a reference array, and a read in the cycle after a
// write to the same address.
module tb_mips_dmem;
  import mips_pkg::*;

  logic  clk = 0, we = 0;
  pc_t   addr;
  data_t wdata, rdata;
  data_t model [256];
  int    checks = 0, failures = 0;

  mips_dmem dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    wdata = 0;
    for (int i = 0; i < 256; i++) begin
      addr = pc_t'(i); #1;
      checks++;
      if (rdata !== 8'h00) begin failures++; $display("FAIL initial [%0d]=%02h", i, rdata); end
    end
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); addr = 8'($urandom); wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL read [%0d]=%02h expected %02h", addr, rdata, model[addr]); end
      @(posedge clk);
      if (we) model[addr] = wdata;
      @(negedge clk);
      we = 0; #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL read-after-write [%0d]=%02h", addr, rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
