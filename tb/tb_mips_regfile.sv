// tb_mips_regfile: self-checking test of the 8 x 8 register file: reset to zero, random
// writes and two simultaneous reads compared with a reference array, including reads of
// the register being written in the same cycle (write-through).
module tb_mips_regfile;
  import mips_pkg::*;

  logic   clk = 0, rst = 1, we = 0;
  raddr_t ra, rb, wa;
  data_t  rda, rdb, wd;
  data_t  regs [NREGS];
  data_t  model [NREGS];
  int     checks = 0, failures = 0, bypass_hits = 0;

  mips_regfile dut (.clk(clk), .rst(rst), .ra_addr(ra), .rb_addr(rb), .ra_data(rda),
                    .rb_data(rdb), .we(we), .w_addr(wa), .w_data(wd), .regs(regs));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ra = 0; rb = 0; wa = 0; wd = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < NREGS; i++) begin
      checks++;
      if (regs[i] !== 8'h00) begin failures++; $display("FAIL R%0d not reset", i); end
    end
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom); wa = 3'($urandom); wd = 8'($urandom);
      ra = 3'($urandom); rb = (i % 4 == 0) ? wa : 3'($urandom);
      #1;
      checks += 2;
      if (rda !== ((we && wa == ra) ? wd : model[ra])) begin
        failures++; $display("FAIL read A R%0d=%02h", ra, rda);
      end
      if (rdb !== ((we && wa == rb) ? wd : model[rb])) begin
        failures++; $display("FAIL read B R%0d=%02h", rb, rdb);
      end
      if (we && (wa == ra || wa == rb)) bypass_hits++;
      @(posedge clk);
      if (we) model[wa] = wd;
      @(negedge clk);
      for (int r = 0; r < NREGS; r++) begin
        checks++;
        if (regs[r] !== model[r]) begin failures++; $display("FAIL R%0d=%02h expected %02h", r, regs[r], model[r]); end
      end
    end
    checks++;
    if (bypass_hits == 0) begin failures++; $display("FAIL write-through never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
