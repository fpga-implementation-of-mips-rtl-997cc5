// tb_mips_psw: self-checking test of the PSW register: reset clears it, a write loads the
// flags on the clock edge, and with the enable low the value holds.
module tb_mips_psw;
  import mips_pkg::*;

  logic clk = 0, rst = 1, we = 0;
  psw_t din, q, model;
  int   checks = 0, failures = 0;

  mips_psw dut (.clk(clk), .rst(rst), .we(we), .flags_in(din), .psw(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 3'b111;
    @(negedge clk); @(negedge clk);
    checks++; if (q !== 3'b000) begin failures++; $display("FAIL reset value %b", q); end
    rst = 0; model = '0;
    for (int i = 0; i < 300; i++) begin
      we  = 1'($urandom);
      din = 3'($urandom);
      @(posedge clk);
      if (we) model = din;
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("FAIL cycle %0d psw=%b expected %b", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
