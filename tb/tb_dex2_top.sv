// tb_dex2_top: end-to-end test of the whole Dex-II at its default sizes.
//
// Part 1 runs the two-issue Fibonacci program with every register preset to
// 000A and checks the four register-file copies against the published
// register dumps taken every six clock ticks (ticks 18..42), then keeps
// comparing with the reference model for 40 more instruction cycles.
// Part 2 runs a program that uses every operation (LD, LDI, ST, MV, ADD,
// SUB, SFTL, SFTR, MULT, all branches taken and not taken), forwarding
// across halves, store mirroring and an R0 destination; it compares PCs,
// all register copies and both data memories with the reference model,
// reads results back through the host port, and counts how often each
// mechanism happened: forwarding from each half, branches taken and not
// taken, mirrored stores, an R0 destination, each of the V, N and Z codes
// set, and every opcode executed (one that never happened is a failure).
module tb_dex2_top;
  import dex2_pkg::*;
  import dex2_asm_pkg::*;
  logic clk = 1'b0, rst, run;
  logic host_en, host_we;
  logic [4:0] host_pe;
  logic [17:0] host_addr;
  logic [15:0] host_wdata, host_rdata;
  phase_t phase;
  logic [2:0] xbar_cfg;
  logic [31:0] cycles;
  logic [17:0] pc_top, pc_bot;
  logic taken_top, taken_bot;
  int checks = 0, failures = 0;
  int n_fwd_t = 0, n_fwd_b = 0, n_taken = 0, n_not = 0, n_mirror = 0, n_r0 = 0;
  int n_v = 0, n_n = 0, n_z = 0;
  int n_op[opcode_e];

  dex2_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic hw(input int pe, input int addr, input logic [15:0] d);
    host_en = 1; host_we = 1; host_pe = 5'(pe); host_addr = 18'(addr); host_wdata = d;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic hr(input int pe, input int addr, output logic [15:0] d);
    host_en = 1; host_we = 0; host_pe = 5'(pe); host_addr = 18'(addr);
    @(negedge clk);
    host_en = 0;
    @(negedge clk);
    d = host_rdata;
  endtask

  task automatic load_prog(input Dex2Iss iss);
    foreach (iss.prog_t[a]) begin
      hw(1, a, iss.prog_t[a][31:16]); hw(2, a, iss.prog_t[a][15:0]);
    end
    foreach (iss.prog_b[a]) begin
      hw(16, a, iss.prog_b[a][31:16]); hw(15, a, iss.prog_b[a][15:0]);
    end
  endtask

  task automatic set_regs(input logic [15:0] v, input Dex2Iss iss);
    int pes[4] = '{3, 4, 14, 13};
    for (int r = 0; r < 32; r++) begin
      foreach (pes[p]) hw(pes[p], r, (r == 0) ? 16'h0 : v);
      iss.r[r] = (r == 0) ? 16'h0 : v;
    end
  endtask

  function automatic logic [15:0] rf(int copy, int r);
    unique case (copy)
      0: return dut.u_top.u_decode.u_rf_a.mem[r];
      1: return dut.u_top.u_decode.u_rf_b.mem[r];
      2: return dut.u_bot.u_decode.u_rf_a.mem[r];
      default: return dut.u_bot.u_decode.u_rf_b.mem[r];
    endcase
  endfunction

  task automatic cmp_regs(input Dex2Iss iss, input string tag);
    for (int c = 0; c < 4; c++)
      for (int r = 1; r < 32; r++)
        chk(rf(c, r) == iss.r[r], $sformatf("%s copy %0d R%0d=%h exp %h", tag, c, r, rf(c, r), iss.r[r]));
  endtask

  task automatic restart();
    run = 0; rst = 1;
    @(negedge clk);
    rst = 0;
  endtask

  // Mechanism counters.
  always @(posedge clk) if (run && !rst) begin
    if (phase == PH3 && dut.u_top.ifetch[31:30] == 2'b01) begin
      if (taken_top) n_taken++; else n_not++;
    end
    if (|dut.u_top.fwd_top || |dut.u_bot.fwd_top) n_fwd_t++;
    if (|dut.u_top.fwd_bot || |dut.u_bot.fwd_bot) n_fwd_b++;
    if (dut.u_top.mirror_wr) n_mirror++;
    if (dut.u_bot.mirror_wr) n_mirror++;
    if (phase == PH2) begin
      opcode_e o;
      if (dut.u_top.u_alu_cc.cc.v) n_v++;
      if (dut.u_top.u_alu_cc.cc.n) n_n++;
      if (dut.u_top.u_alu_cc.cc.z) n_z++;
      o = opcode_e'(dut.u_top.u_decode.ix[31:27]);
      n_op[o] = n_op.exists(o) ? n_op[o] + 1 : 1;
      o = opcode_e'(dut.u_bot.u_decode.ix[31:27]);
      n_op[o] = n_op.exists(o) ? n_op[o] + 1 : 1;
      if (dut.u_top.u_decode.ix[31:30] == 2'b10 && dut.u_top.u_decode.ix[9:5] == 5'd0) n_r0++;
    end
  end

  initial begin
    Dex2Iss iss;
    logic [15:0] d;
    int tick;
    logic [15:0] dump [5][5];
    run = 0; rst = 1; host_en = 0; host_we = 0; host_pe = 0; host_addr = 0; host_wdata = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // Multiply tables of PE7 and PE10, as the host loads them.
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        hw(7, a * 256 + b, 16'(a * b));
        hw(10, a * 256 + b, 16'(a * b));
      end

    // ---------------- Part 1: Fibonacci ----------------
    iss = new();
    iss.prog_t[0] = w_imm(OP_LDI, 1, 1, 2);      iss.prog_b[0] = w_imm(OP_LDI, 1, 1, 2);
    iss.prog_t[1] = w_reg(OP_ADD, 1, 2, 3, 0);   iss.prog_b[1] = w_nop(3, 0);
    iss.prog_t[2] = w_reg(OP_MV, 2, 0, 1, 2);    iss.prog_b[2] = w_reg(OP_MV, 3, 0, 1, 2);
    iss.prog_t[3] = w_br(OP_BRA, 1);             iss.prog_b[3] = w_br(OP_BRA, 1);
    load_prog(iss);
    set_regs(16'h000A, iss);
    dump[0] = '{16'h0, 16'h1, 16'h1, 16'hA, 16'hA};   // tick 18
    dump[1] = '{16'h0, 16'h1, 16'h1, 16'h2, 16'hA};   // tick 24
    dump[2] = '{16'h0, 16'h1, 16'h2, 16'h2, 16'hA};   // tick 30
    dump[3] = '{16'h0, 16'h1, 16'h2, 16'h2, 16'hA};   // tick 36
    dump[4] = '{16'h0, 16'h1, 16'h2, 16'h3, 16'hA};   // tick 42
    run = 1;
    tick = 0;
    while (tick < 42) begin
      @(negedge clk);
      tick++;
      if (tick >= 18 && tick % 6 == 0)
        for (int c = 0; c < 4; c++)
          for (int r = 1; r < 5; r++)
            chk(rf(c, r) == dump[tick / 6 - 3][r],
                $sformatf("fib tick %0d copy %0d R%0d=%h exp %h", tick, c, r, rf(c, r), dump[tick / 6 - 3][r]));
    end
    chk(cycles == 32'd7, "seven instruction cycles in 42 ticks");
    // Continue: every cycle against the model.  After instruction cycle C
    // the register file holds the results of the first C-2 words.
    for (int c = 0; c < 5; c++) void'(iss.step());
    for (int c = 0; c < 40; c++) begin
      repeat (6) @(negedge clk);
      void'(iss.step());
      cmp_regs(iss, $sformatf("fib cycle %0d", c + 7));
    end
    $display("fib: R1=%0d R2=%0d R3=%0d after %0d cycles", rf(0, 1), rf(0, 2), rf(0, 3), cycles);

    // ---------------- Part 2: every mechanism ----------------
    restart();
    iss = new();
    begin
      logic [31:0] t[27], b[27];
      t[0]  = w_imm(OP_LDI, 5, 1, 2);            b[0]  = w_imm(OP_LDI, 3, 1, 2);
      t[1]  = w_imm(OP_LDI, 16'h8000, 3, 4);     b[1]  = w_imm(OP_LDI, 16'h0100, 3, 4);
      t[2]  = w_reg(OP_MULT, 1, 2, 7, 8);        b[2]  = w_reg(OP_SFTL, 3, 0, 7, 8);
      t[3]  = w_reg(OP_SFTR, 3, 0, 9, 10);       b[3]  = w_reg(OP_ADD, 7, 8, 9, 10);
      t[4]  = w_reg(OP_SUB, 1, 2, 11, 0);        b[4]  = w_reg(OP_SUB, 1, 2, 11, 0);
      t[5]  = w_reg(OP_ST, 7, 4, 0, 0);          b[5]  = w_reg(OP_ST, 1, 3, 0, 0);
      t[6]  = w_br(OP_BZ, 20);                   b[6]  = w_br(OP_BZ, 20);
      t[7]  = w_br(OP_BN, 20);                   b[7]  = w_br(OP_BN, 20);
      t[8]  = w_br(OP_BNZ, 20);                  b[8]  = w_br(OP_BNZ, 20);
      t[9]  = w_reg(OP_SUB, 2, 1, 12, 0);        b[9]  = w_reg(OP_SUB, 2, 1, 12, 0);
      t[10] = w_reg(OP_LD, 0, 3, 13, 14);        b[10] = w_reg(OP_LD, 0, 4, 13, 14);
      t[11] = w_br(OP_BN, 13);                   b[11] = w_br(OP_BN, 13);
      t[12] = w_imm(OP_LDI, 16'hDEAD, 15, 0);    b[12] = w_nop(15, 0);
      t[13] = w_reg(OP_ADD, 13, 14, 0, 16);      b[13] = w_reg(OP_MV, 13, 0, 0, 16);
      t[14] = w_reg(OP_SUB, 1, 1, 17, 0);        b[14] = w_reg(OP_SUB, 1, 1, 17, 0);
      t[15] = w_reg(OP_MV, 0, 0, 18, 19);        b[15] = w_imm(OP_LDI, 7, 18, 19);
      t[16] = w_br(OP_BZ, 18);                   b[16] = w_br(OP_BZ, 18);
      t[17] = w_imm(OP_LDI, 1, 20, 0);           b[17] = w_nop(20, 0);
      t[18] = w_br(OP_BNV, 21);                  b[18] = w_br(OP_BNV, 21);
      t[19] = w_imm(OP_LDI, 1, 21, 0);           b[19] = w_nop(21, 0);
      t[20] = w_imm(OP_LDI, 16'h0BAD, 22, 0);    b[20] = w_nop(22, 0);
      t[21] = w_reg(OP_ADD, 1, 1, 23, 0);        b[21] = w_reg(OP_ADD, 1, 1, 23, 0);
      t[22] = w_reg(OP_SUB, 2, 1, 24, 0);        b[22] = w_reg(OP_SUB, 2, 1, 24, 0);
      t[23] = w_reg(OP_MULT, 23, 23, 25, 26);    b[23] = w_reg(OP_SFTR, 24, 0, 25, 26);
      t[24] = w_br(OP_BNZ, 26);                  b[24] = w_br(OP_BNZ, 26);
      t[25] = w_imm(OP_LDI, 1, 27, 0);           b[25] = w_nop(27, 0);
      t[26] = w_br(OP_BRA, 26);                  b[26] = w_br(OP_BRA, 26);
      for (int i = 0; i < 27; i++) begin iss.prog_t[i] = t[i]; iss.prog_b[i] = b[i]; end
    end
    load_prog(iss);
    set_regs(16'h0000, iss);
    run = 1;
    for (int c = 0; c < 40; c++) begin
      chk(int'(pc_top) == iss.pc && int'(pc_bot) == iss.pc,
          $sformatf("pc %0d/%0d exp %0d at cycle %0d", pc_top, pc_bot, iss.pc, c));
      chk(iss.step(), "halves branch alike");
      repeat (6) @(negedge clk);
    end
    // The model ran 40 words; the machine has completed 38: finish the pipe.
    repeat (12) @(negedge clk);
    run = 0;
    @(negedge clk);
    cmp_regs(iss, "mech");
    chk(iss.r[10] == 16'd15 && iss.r[13] == 16'd5 && iss.r[14] == 16'd15, "model sanity");
    chk(iss.r[15] == 16'h0 && iss.r[20] == 16'h0 && iss.r[22] == 16'h0 && iss.r[27] == 16'h0, "skipped words");
    // Host read-back of registers and both data memories.
    hr(3, 10, d);  chk(d == iss.r[10], "host read R10 top");
    hr(13, 25, d); chk(d == iss.r[25], "host read R25 bottom copy B");
    hr(14, 26, d); chk(d == iss.r[26], "host read R26 bottom");
    foreach (iss.m[a]) begin
      hr(8, a, d);  chk(d == iss.m[a], $sformatf("top mem[%h]=%h exp %h", a, d, iss.m[a]));
      hr(9, a, d);  chk(d == iss.m[a], $sformatf("bot mem[%h]=%h exp %h", a, d, iss.m[a]));
    end
    hr(5, 0, d); chk(d == 16'h0, "PE5 has no memory");

    // ---------------- mechanisms seen ----------------
    $display("mechanisms: fwd_top=%0d fwd_bot=%0d taken=%0d not_taken=%0d mirror=%0d r0_dest=%0d",
             n_fwd_t, n_fwd_b, n_taken, n_not, n_mirror, n_r0);
    chk(n_fwd_t > 0, "forward from top result");
    chk(n_fwd_b > 0, "forward from bottom result");
    chk(n_taken > 0 && n_not > 0, "branch taken and not taken");
    chk(n_mirror >= 2, "store mirrored into other half");
    chk(n_r0 > 0, "R0 destination suppressed");
    $display("condition codes seen set: V=%0d N=%0d Z=%0d cycles", n_v, n_n, n_z);
    chk(n_v > 0 && n_n > 0 && n_z > 0, "overflow (carry), negative and zero codes each set");
    foreach (n_op[o]) $display("  %s: %0d", o.name(), n_op[o]);
    begin
      opcode_e all[15] = '{OP_NOP, OP_LD, OP_LDI, OP_ST, OP_MV, OP_BRA, OP_BZ, OP_BN,
                           OP_BNZ, OP_BNV, OP_ADD, OP_SUB, OP_SFTL, OP_SFTR, OP_MULT};
      foreach (all[i]) chk(n_op.exists(all[i]), $sformatf("operation %s executed", all[i].name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
