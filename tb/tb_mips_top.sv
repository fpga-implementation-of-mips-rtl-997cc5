// tb_mips_top: end-to-end test of the four-stage pipelined processor at its default size.
//
// Part 1 runs the power-up demonstration program (LDI R1,5; LDI R2,6; ADD; SUB; MUL) and
// checks the ALU output and registers R1/R2 cycle by cycle: one instruction per clock; an
// instruction loaded into Stage I on rising edge n is in execute after edge n+1 and its
// result is in the register file after edge n+3, so the five instructions are complete
// eight edges after reset is released.
// Part 2 loads a hand-written loop (multiply by repeated addition, backward conditional
// branch, store, load, logic, shifts). Part 3 loads random programs with forward branches.
// Parts 2 and 3 are checked against an instruction-level reference model in this file
// that executes one instruction at a time: the sequence of register writes, the final
// registers, PSW and data RAM must match. Every program ends in a jump to itself.
// Each pipeline mechanism is counted: forwarding of A and of B, register-file
// write-through, taken and not-taken branches, loads, stores and flag updates; one that
// never happened is a failure.
module tb_mips_top;
  import mips_pkg::*;

  logic   clk = 0, rst = 1, prog_we = 0;
  pc_t    prog_addr = 0;
  instr_t prog_data = 0;
  pc_t    pc;
  instr_t instr;
  data_t  alu_out;
  psw_t   psw;
  data_t  regs [NREGS];
  logic   wb_we;
  raddr_t wb_dest;
  data_t  wb_data;

  int checks = 0, failures = 0;
  int n_fwd_a = 0, n_fwd_b = 0, n_wthru = 0, n_taken = 0, n_not_taken = 0;
  int n_ld = 0, n_st = 0, n_flags = 0;

  mips_top dut (.clk(clk), .rst(rst), .prog_we(prog_we), .prog_addr(prog_addr),
                .prog_data(prog_data), .pc(pc), .instr(instr), .alu_out(alu_out), .psw(psw),
                .regs(regs), .wb_we(wb_we), .wb_dest(wb_dest), .wb_data(wb_data));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters (observed inside the pipeline) ----------------
  always @(posedge clk) if (!rst) begin
    if (dut.u_decode.s2.ctrl.fwd_a && dut.u_decode.s2.ctrl.reg_we | dut.u_decode.s2.ctrl.mem_we
        | dut.u_decode.s2.ctrl.alu.set_flags) n_fwd_a++;
    if (dut.u_decode.s2.ctrl.fwd_b) n_fwd_b++;
    if (wb_we && (dut.u_decode.u_rf.ra_addr == wb_dest || dut.u_decode.u_rf.rb_addr == wb_dest)) n_wthru++;
    if (dut.u_decode.s2.ctrl.mem_rd) n_ld++;
    if (dut.u_decode.s2.ctrl.mem_we) n_st++;
    if (dut.u_decode.s2.ctrl.alu.set_flags) n_flags++;
    if (instr[17:16] == 2'b11) begin
      if (dut.branch) n_taken++; else n_not_taken++;
    end
  end

  // ---------------- instruction-level reference model ----------------
  instr_t prog [256];
  data_t  m_r [NREGS];
  data_t  m_ram [256];
  psw_t   m_psw;
  raddr_t exp_dest [$];
  data_t  exp_val  [$];

  function automatic psw_t flags_of(int unsigned y, logic c);
    psw_t p;
    p.z = ((y & 255) == 0); p.n = y[7]; p.c = c;
    return p;
  endfunction

  // returns the number of instructions executed
  function automatic int run_model(int max_steps);
    int unsigned pcv, a, b, y, full;
    logic [7:0] opc; raddr_t ra, rb; logic [7:0] imm;
    int steps = 0;
    foreach (m_r[i]) m_r[i] = '0;
    m_psw = '0;
    exp_dest.delete(); exp_val.delete();
    pcv = 0;
    while (steps < max_steps) begin
      instr_t w = prog[pcv];
      opc = w[23:16]; ra = w[15:13]; rb = w[12:10]; imm = w[7:0];
      a = m_r[ra]; b = m_r[rb];
      steps++;
      if (opc == 8'h03 && imm == pcv[7:0]) break;  // jump to self: end of program
      pcv = (pcv + 1) & 255;
      case (opc)
        8'h01: begin full = a + b; y = full & 255; m_psw = flags_of(y, full[8]); end
        8'h05: begin y = (a - b) & 255; m_psw = flags_of(y, a < b); end
        8'h09: begin full = a * b; y = full & 255; m_psw = flags_of(y, full > 255); end
        8'h0D: begin y = a & b; m_psw = flags_of(y, 0); end
        8'h15: begin y = a | b; m_psw = flags_of(y, 0); end
        8'h19: begin y = a ^ b; m_psw = flags_of(y, 0); end
        8'h1D: begin y = (~a) & 255; m_psw = flags_of(y, 0); end
        8'h21: begin y = (a << 1) & 255; m_psw = flags_of(y, a[7]); end
        8'h25: begin y = a >> 1; m_psw = flags_of(y, a[0]); end
        8'h29: y = b;
        8'h2D: begin y = (a - b) & 255; m_psw = flags_of(y, a < b); end
        8'h31: begin full = a + imm; y = full & 255; m_psw = flags_of(y, full[8]); end
        8'h11: y = imm;
        8'h02: y = m_ram[imm];
        8'h06: m_ram[imm] = data_t'(a);
        8'h03: pcv = imm;
        8'h07: if (m_psw.z)  pcv = imm;
        8'h0B: if (!m_psw.z) pcv = imm;
        8'h0F: if (m_psw.c)  pcv = imm;
        8'h13: if (!m_psw.c) pcv = imm;
        8'h17: if (m_psw.n)  pcv = imm;
        default: ;
      endcase
      if (opc inside {8'h01, 8'h05, 8'h09, 8'h0D, 8'h15, 8'h19, 8'h1D, 8'h21, 8'h25, 8'h29,
                      8'h31, 8'h11, 8'h02}) begin
        m_r[ra] = data_t'(y);
        exp_dest.push_back(ra); exp_val.push_back(data_t'(y));
      end
    end
    return steps;
  endfunction

  task automatic load_program(int n);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      prog_we = 1; prog_addr = pc_t'(i); prog_data = (i < n) ? prog[i] : 24'h000000;
      @(negedge clk);
    end
    prog_we = 0;
  endtask

  // run the loaded program on the processor and compare with the model
  task automatic run_and_compare(string name, int max_steps);
    int steps, idx, cyc;
    data_t dram;
    foreach (m_ram[i]) m_ram[i] = dut.u_execute.u_ram.mem[i];
    steps = run_model(max_steps);
    @(negedge clk); rst = 0;
    idx = 0; cyc = 0;
    while (cyc < steps + 10) begin
      @(posedge clk); #1;
      cyc++;
      if (wb_we) begin
        checks++;
        if (idx >= exp_dest.size()) begin
          failures++; $display("FAIL %s extra write R%0d=%02h", name, wb_dest, wb_data);
        end else if (wb_dest !== exp_dest[idx] || wb_data !== exp_val[idx]) begin
          failures++;
          $display("FAIL %s write %0d: R%0d=%02h expected R%0d=%02h", name, idx, wb_dest, wb_data,
                   exp_dest[idx], exp_val[idx]);
        end
        idx++;
      end
    end
    @(negedge clk);
    checks += 2;
    if (idx != exp_dest.size()) begin failures++; $display("FAIL %s %0d writes, expected %0d", name, idx, exp_dest.size()); end
    if (psw !== m_psw) begin failures++; $display("FAIL %s psw=%b expected %b", name, psw, m_psw); end
    for (int r = 0; r < NREGS; r++) begin
      checks++;
      if (regs[r] !== m_r[r]) begin failures++; $display("FAIL %s R%0d=%02h expected %02h", name, r, regs[r], m_r[r]); end
    end
    for (int i = 0; i < 256; i++) begin
      dram = dut.u_execute.u_ram.mem[i];
      checks++;
      if (dram !== m_ram[i]) begin failures++; $display("FAIL %s RAM[%0d]=%02h expected %02h", name, i, dram, m_ram[i]); end
    end
  endtask

  function automatic instr_t I(logic [7:0] opc, int ra, int rb, int imm);
    return {opc, 3'(ra), 3'(rb), 2'b00, 8'(imm)};
  endfunction

  // random program: forward branches only, no conditional branch right after a
  // flag-setting instruction, ends in a jump to itself
  task automatic gen_random(int n);
    logic [7:0] ops [20] = '{8'h01, 8'h05, 8'h09, 8'h0D, 8'h15, 8'h19, 8'h1D, 8'h21, 8'h25,
                             8'h29, 8'h2D, 8'h31, 8'h11, 8'h11, 8'h02, 8'h06, 8'h07, 8'h0B,
                             8'h0F, 8'h03};
    logic [7:0] opc, prev;
    prev = 8'h00;
    for (int i = 0; i < n - 1; i++) begin
      opc = ops[$urandom % 20];
      if ($urandom % 12 == 0) opc = ($urandom % 2) ? 8'h13 : 8'h17;
      if (opc[1:0] == 2'b11 && opc != 8'h03 && prev[1:0] == 2'b01 && prev != 8'h11 && prev != 8'h29)
        opc = 8'h00;  // keep a flag-setting instruction away from the branch after it
      if (opc[1:0] == 2'b11)
        prog[i] = I(opc, 0, 0, i + 1 + int'($urandom % 4) > n - 1 ? n - 1 : i + 1 + int'($urandom % 4));
      else if (opc[1:0] == 2'b10)
        prog[i] = I(opc, $urandom % 8, $urandom % 8, $urandom % 8);
      else
        prog[i] = I(opc, $urandom % 8, $urandom % 8, $urandom % 256);
      prev = opc;
    end
    prog[n - 1] = I(8'h03, 0, 0, n - 1);
  endtask

  initial begin
    // ---------------- part 1: power-up demonstration program ----------------
    data_t exp_alu [9] = '{8'h00, 8'h00, 8'h05, 8'h06, 8'h0B, 8'h05, 8'h1E, 8'h00, 8'h00};
    data_t exp_r1  [9] = '{8'h00, 8'h00, 8'h00, 8'h00, 8'h05, 8'h05, 8'h0B, 8'h05, 8'h1E};
    data_t exp_r2  [9] = '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h06, 8'h06, 8'h06, 8'h06};
    @(negedge clk); @(negedge clk);
    rst = 0;
    // k = number of rising edges since reset was released
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (alu_out !== exp_alu[k]) begin failures++; $display("FAIL demo edge %0d alu_out=%02h expected %02h", k, alu_out, exp_alu[k]); end
      checks += 2;
      if (regs[1] !== exp_r1[k]) begin failures++; $display("FAIL demo edge %0d R1=%02h expected %02h", k, regs[1], exp_r1[k]); end
      if (regs[2] !== exp_r2[k]) begin failures++; $display("FAIL demo edge %0d R2=%02h expected %02h", k, regs[2], exp_r2[k]); end
      @(negedge clk);
    end
    $display("demo program: R1=%02h R2=%02h after 8 cycles (5 instructions)", regs[1], regs[2]);

    // ---------------- part 2: loop with backward branch, memory, logic ----------------
    foreach (prog[i]) prog[i] = 24'h000000;
    prog[0]  = I(8'h11, 1, 0, 0);      // LDI R1,0
    prog[1]  = I(8'h11, 2, 0, 5);      // LDI R2,5
    prog[2]  = I(8'h11, 3, 0, 6);      // LDI R3,6
    prog[3]  = I(8'h11, 4, 0, 1);      // LDI R4,1
    prog[4]  = I(8'h01, 1, 2, 0);      // loop: ADD R1,R2
    prog[5]  = I(8'h05, 3, 4, 0);      // SUB R3,R4  (sets Z when the count reaches 0)
    prog[6]  = I(8'h00, 0, 0, 0);      // NOP (branch must not follow the flag setter)
    prog[7]  = I(8'h0B, 0, 0, 4);      // JNZ loop
    prog[8]  = I(8'h06, 1, 0, 8'h20);  // ST R1,[0x20]
    prog[9]  = I(8'h02, 5, 0, 8'h20);  // LD R5,[0x20]
    prog[10] = I(8'h01, 5, 5, 0);      // ADD R5,R5   (forward A and B from the load)
    prog[11] = I(8'h29, 6, 5, 0);      // MOV R6,R5
    prog[12] = I(8'h19, 6, 2, 0);      // XOR R6,R2
    prog[13] = I(8'h21, 6, 0, 0);      // SHL R6
    prog[14] = I(8'h25, 5, 0, 0);      // SHR R5
    prog[15] = I(8'h2D, 5, 1, 0);      // CMP R5,R1
    prog[16] = I(8'h11, 7, 0, 8'h99);  // LDI R7,0x99
    prog[17] = I(8'h07, 0, 0, 19);     // JZ 19 (taken: R5 == R1)
    prog[18] = I(8'h11, 7, 0, 8'h11);  // skipped
    prog[19] = I(8'h09, 7, 4, 0);      // MUL R7,R4
    prog[20] = I(8'h06, 7, 0, 8'h21);  // ST R7,[0x21]
    prog[21] = I(8'h03, 0, 0, 21);     // JMP self
    load_program(22);
    run_and_compare("loop", 1000);
    checks += 2;
    if (regs[1] !== 8'd30) begin failures++; $display("FAIL loop product R1=%0d", regs[1]); end
    if (dut.u_execute.u_ram.mem[8'h21] !== 8'h99) begin failures++; $display("FAIL loop RAM[0x21]"); end

    // ---------------- part 3: random programs ----------------
    for (int p = 0; p < 40; p++) begin
      foreach (prog[i]) prog[i] = 24'h000000;
      gen_random(64);
      load_program(64);
      run_and_compare($sformatf("random%0d", p), 1000);
    end

    $display("mechanisms: fwd_a=%0d fwd_b=%0d write_through=%0d taken=%0d not_taken=%0d loads=%0d stores=%0d flag_updates=%0d",
             n_fwd_a, n_fwd_b, n_wthru, n_taken, n_not_taken, n_ld, n_st, n_flags);
    checks += 8;
    if (n_fwd_a == 0)     begin failures++; $display("FAIL forwarding of A never happened"); end
    if (n_fwd_b == 0)     begin failures++; $display("FAIL forwarding of B never happened"); end
    if (n_wthru == 0)     begin failures++; $display("FAIL write-through never happened"); end
    if (n_taken == 0)     begin failures++; $display("FAIL no taken branch"); end
    if (n_not_taken == 0) begin failures++; $display("FAIL no not-taken branch"); end
    if (n_ld == 0)        begin failures++; $display("FAIL no load"); end
    if (n_st == 0)        begin failures++; $display("FAIL no store"); end
    if (n_flags == 0)     begin failures++; $display("FAIL no flag update"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
