// tb_bubble_sort: workload test, the document's bubble sort on the full
// Dex-II at default sizes.
//
// Runs the two-issue version (the document's VLIW bubble sort figure), the
// scalar version (its RISC bubble sort figure) and the optimized scalar
// version on random arrays held in data memory words 0..LEN-1. Loaded through the host port like the other
// tests. Checks:
//  - the array ends sorted (the program swaps when mem[i] < mem[j], so the
//    order is descending) and is a permutation of the input, in both data
//    memories (PE8 and PE9);
//  - the PC before every instruction cycle against the reference model;
//  - the instruction cycles needed to reach End equal the words the model
//    executes, each exactly six clock ticks long;
//  - the two-issue version needs fewer cycles than the scalar one, and the
//    optimized scalar one exactly one cycle less per outer-loop pass.
// Reading of the listings (this design's choices): "LD R2, R1" and
// "LD R5, R6" copy a register (MV), "LD R6, R2" loads from address R2; the
// scalar code runs with the branch and compare words copied into the other
// half so both halves' PCs and condition codes stay together, and every
// other word of that half is a NOP with the same destination fields.
// Array values stay below 16384 so the sign of a difference is the order.
module tb_bubble_sort;
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

  dex2_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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

  // Two-issue listing; End is word 19.
  task automatic vliw(input Dex2Iss s, input int len);
    s.prog_t[0]  = w_imm(OP_LDI, 0, 1, 2);      s.prog_b[0]  = w_imm(OP_LDI, 0, 1, 2);
    s.prog_t[1]  = w_imm(OP_LDI, len, 3, 8);    s.prog_b[1]  = w_imm(OP_LDI, 1, 3, 8);
    s.prog_t[2]  = w_reg(OP_SUB, 3, 1, 4, 4);   s.prog_b[2]  = w_reg(OP_SUB, 3, 1, 4, 4);
    s.prog_t[3]  = w_nop();                     s.prog_b[3]  = w_nop();
    s.prog_t[4]  = w_br(OP_BZ, 19);             s.prog_b[4]  = w_br(OP_BZ, 19);
    s.prog_t[5]  = w_reg(OP_MV, 1, 0, 2, 5);    s.prog_b[5]  = w_reg(OP_LD, 0, 1, 2, 5);
    s.prog_t[6]  = w_reg(OP_LD, 0, 2, 6, 0);    s.prog_b[6]  = w_nop(6, 0);
    s.prog_t[7]  = w_reg(OP_SUB, 5, 6, 4, 4);   s.prog_b[7]  = w_reg(OP_SUB, 5, 6, 4, 4);
    s.prog_t[8]  = w_nop();                     s.prog_b[8]  = w_nop();
    s.prog_t[9]  = w_br(OP_BN, 16);             s.prog_b[9]  = w_br(OP_BN, 16);
    s.prog_t[10] = w_reg(OP_ADD, 2, 8, 2, 0);   s.prog_b[10] = w_nop(2, 0);
    s.prog_t[11] = w_reg(OP_SUB, 2, 3, 4, 4);   s.prog_b[11] = w_reg(OP_SUB, 2, 3, 4, 4);
    s.prog_t[12] = w_nop();                     s.prog_b[12] = w_nop();
    s.prog_t[13] = w_br(OP_BN, 6);              s.prog_b[13] = w_br(OP_BN, 6);
    s.prog_t[14] = w_reg(OP_ADD, 1, 8, 1, 0);   s.prog_b[14] = w_nop(1, 0);
    s.prog_t[15] = w_br(OP_BRA, 2);             s.prog_b[15] = w_br(OP_BRA, 2);
    s.prog_t[16] = w_reg(OP_ST, 6, 1, 0, 0);    s.prog_b[16] = w_reg(OP_ST, 5, 2, 0, 0);
    s.prog_t[17] = w_reg(OP_MV, 6, 0, 5, 0);    s.prog_b[17] = w_nop(5, 0);
    s.prog_t[18] = w_br(OP_BRA, 10);            s.prog_b[18] = w_br(OP_BRA, 10);
    s.prog_t[19] = w_br(OP_BRA, 19);            s.prog_b[19] = w_br(OP_BRA, 19);
  endtask

  // Scalar listing; End is word 23.
  task automatic risc(input Dex2Iss s, input int len);
    logic [31:0] t[24];
    t[0]  = w_imm(OP_LDI, 0, 1, 0);    t[1]  = w_imm(OP_LDI, 0, 2, 0);
    t[2]  = w_imm(OP_LDI, len, 3, 0);  t[3]  = w_imm(OP_LDI, 1, 8, 0);
    t[4]  = w_reg(OP_SUB, 3, 1, 4, 0); t[5]  = w_nop();
    t[6]  = w_br(OP_BZ, 23);           t[7]  = w_reg(OP_MV, 1, 0, 2, 0);
    t[8]  = w_reg(OP_LD, 0, 1, 5, 0);  t[9]  = w_reg(OP_LD, 0, 2, 6, 0);
    t[10] = w_reg(OP_SUB, 5, 6, 4, 0); t[11] = w_nop();
    t[12] = w_br(OP_BN, 19);           t[13] = w_reg(OP_ADD, 2, 8, 2, 0);
    t[14] = w_reg(OP_SUB, 2, 3, 4, 0); t[15] = w_nop();
    t[16] = w_br(OP_BN, 9);            t[17] = w_reg(OP_ADD, 1, 8, 1, 0);
    t[18] = w_br(OP_BRA, 4);           t[19] = w_reg(OP_ST, 6, 1, 0, 0);
    t[20] = w_reg(OP_ST, 5, 2, 0, 0);  t[21] = w_reg(OP_MV, 6, 0, 5, 0);
    t[22] = w_br(OP_BRA, 13);          t[23] = w_br(OP_BRA, 23);
    foreach (t[i]) begin
      s.prog_t[i] = t[i];
      s.prog_b[i] = (t[i][31:30] == 2'b01 || t[i][31:30] == 2'b10) ? t[i] : w_nop(t[i][9:5], t[i][4:0]);
    end
  endtask

  // Optimized scalar listing: the move of j <- i fills the compare gap of
  // Loop1. End is word 22.
  task automatic risc_opt(input Dex2Iss s, input int len);
    logic [31:0] t[23];
    t[0]  = w_imm(OP_LDI, 0, 1, 0);    t[1]  = w_imm(OP_LDI, 0, 2, 0);
    t[2]  = w_imm(OP_LDI, len, 3, 0);  t[3]  = w_imm(OP_LDI, 1, 8, 0);
    t[4]  = w_reg(OP_SUB, 3, 1, 4, 0); t[5]  = w_reg(OP_MV, 1, 0, 2, 0);
    t[6]  = w_br(OP_BZ, 22);           t[7]  = w_reg(OP_LD, 0, 1, 5, 0);
    t[8]  = w_reg(OP_LD, 0, 2, 6, 0);  t[9]  = w_reg(OP_SUB, 5, 6, 4, 0);
    t[10] = w_nop();                   t[11] = w_br(OP_BN, 18);
    t[12] = w_reg(OP_ADD, 2, 8, 2, 0); t[13] = w_reg(OP_SUB, 2, 3, 4, 0);
    t[14] = w_nop();                   t[15] = w_br(OP_BN, 8);
    t[16] = w_reg(OP_ADD, 1, 8, 1, 0); t[17] = w_br(OP_BRA, 4);
    t[18] = w_reg(OP_ST, 6, 1, 0, 0);  t[19] = w_reg(OP_ST, 5, 2, 0, 0);
    t[20] = w_reg(OP_MV, 6, 0, 5, 0);  t[21] = w_br(OP_BRA, 12);
    t[22] = w_br(OP_BRA, 22);
    foreach (t[i]) begin
      s.prog_t[i] = t[i];
      s.prog_b[i] = (t[i][31:30] == 2'b01 || t[i][31:30] == 2'b10) ? t[i] : w_nop(t[i][9:5], t[i][4:0]);
    end
  endtask

  // Load, run to End, check; returns the instruction cycles used.
  // variant: 0 two-issue, 1 scalar, 2 optimized scalar.
  task automatic sort_run(input int variant, input logic [15:0] a[$], output int used);
    Dex2Iss s;
    logic [15:0] got, exp_sorted[$];
    int end_pc, ticks, len;
    len = a.size();
    s = new();
    unique case (variant)
      0: begin vliw(s, len); end_pc = 19; end
      1: begin risc(s, len); end_pc = 23; end
      default: begin risc_opt(s, len); end_pc = 22; end
    endcase
    run = 0; rst = 1;
    @(negedge clk);
    rst = 0;
    foreach (s.prog_t[w]) begin
      hw(1, w, s.prog_t[w][31:16]); hw(2, w, s.prog_t[w][15:0]);
      hw(16, w, s.prog_b[w][31:16]); hw(15, w, s.prog_b[w][15:0]);
    end
    for (int i = 0; i < len; i++) begin
      hw(8, i, a[i]); hw(9, i, a[i]);
      s.m[i] = a[i];
    end
    used = 0; ticks = 0;
    run = 1;
    while (int'(pc_top) != end_pc && used < 100000) begin
      chk(int'(pc_top) == s.pc && int'(pc_bot) == s.pc,
          $sformatf("pc %0d/%0d exp %0d at cycle %0d", pc_top, pc_bot, s.pc, used));
      chk(s.step(), "halves branch alike");
      repeat (6) begin @(negedge clk); ticks++; end
      used++;
    end
    chk(s.pc == end_pc, "model reached End at the same cycle");
    chk(s.words == used && cycles == 32'(used) && ticks == 6 * used,
        $sformatf("cycles %0d, model words %0d, ticks %0d", cycles, s.words, ticks));
    repeat (12) @(negedge clk);   // drain the pipeline
    run = 0;
    @(negedge clk);
    exp_sorted = a;
    exp_sorted.rsort();
    for (int i = 0; i < len; i++) begin
      hr(8, i, got); chk(got == exp_sorted[i], $sformatf("top mem[%0d]=%0d exp %0d", i, got, exp_sorted[i]));
      hr(9, i, got); chk(got == exp_sorted[i], $sformatf("bot mem[%0d]=%0d exp %0d", i, got, exp_sorted[i]));
      chk(s.m[i] == exp_sorted[i], "model sorted");
    end
    $display("%s bubble sort of %0d words: %0d instruction cycles, %0d clock ticks",
             variant == 0 ? "two-issue" : variant == 1 ? "scalar" : "optimized scalar", len, used, ticks);
  endtask

  initial begin
    int cv, cr, co;
    run = 0; rst = 1; host_en = 0; host_we = 0; host_pe = 0; host_addr = 0; host_wdata = 0;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      int len;
      automatic logic [15:0] a[$];
      len = (k == 0) ? 1 : $urandom_range(8, 24);
      for (int i = 0; i < len; i++) a.push_back(16'($urandom_range(0, 16383)));
      sort_run(0, a, cv);
      sort_run(1, a, cr);
      sort_run(2, a, co);
      chk(k == 0 || cv < cr, $sformatf("two-issue (%0d) faster than scalar (%0d)", cv, cr));
      // The optimized scalar code saves exactly one cycle per Loop1 pass
      // that goes on to Loop2 (len of them; the last pass leaves through
      // BZ End and is as long in both).
      chk(co == cr - len, $sformatf("optimized scalar %0d = scalar %0d - %0d", co, cr, len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
