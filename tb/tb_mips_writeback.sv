// tb_mips_writeback: self-checking test of the Stage-III register: reset clears it and
// each cycle it holds exactly what the execute stage presented one edge earlier.
module tb_mips_writeback;
  import mips_pkg::*;

  logic    clk = 0, rst = 1;
  stage3_t d, q, model;
  int      checks = 0, failures = 0;

  mips_writeback dut (.clk(clk), .rst(rst), .s3_next(d), .s3(q));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    @(negedge clk); @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset %h", q); end
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      d = stage3_t'($urandom);
      @(posedge clk);
      model = d;
      @(negedge clk);
      d = stage3_t'($urandom);  // changing the input between edges must not matter
      #1;
      checks += 3;
      if (q.we !== model.we) begin failures++; $display("FAIL we"); end
      if (q.dest !== model.dest) begin failures++; $display("FAIL dest"); end
      if (q.result !== model.result) begin failures++; $display("FAIL result %02h expected %02h", q.result, model.result); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
