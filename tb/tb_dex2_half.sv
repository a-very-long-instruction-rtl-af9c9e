// tb_dex2_half: one processor half running scalar code on its own.
//
// The half is instantiated with its twin tied off (peer_res = 0,
// xch_st_in driven by the bench, every Dest Bot field 0), which is how the
// document's single-issue RISC version of the machine runs. The bench holds
// its own phase counter (phase_ctrl) and loads the program and the register
// file through the half's host ports. Program: the scalar Fibonacci loop
// with a store of every new number and a restart once it passes 100:
//   0 LDI R1,1     1 LDI R2,1   2 LDI R9,100   3 ADD R3,R1,R2
//   4 SUB R4,R3,R9 5 MV R1,R2   6 MV R2,R3     7 ST (R1),R3
//   8 BN 3         9 LDI R1,1  10 LDI R2,1    11 BRA 3
// Checks: the PC before every instruction cycle and the register file after
// it against the reference model (each word takes exactly one six-tick
// instruction cycle; after cycle C the first C-2 words are complete), the
// store offered to the twin (xch_*), a store mirrored in from the bench in
// phase 3 of random cycles, and the data memory read back by the host.
module tb_dex2_half;
  import dex2_pkg::*;
  import dex2_asm_pkg::*;
  logic clk = 1'b0, rst, run;
  phase_t phase;
  logic [2:0] xbar_cfg;
  logic cycle_end;
  logic [31:0] cycles;
  host_req_t [5:0] host;
  logic [5:0][DW-1:0] host_rdata;
  logic [DW-1:0] own_res;
  logic xch_st_out, xch_st_in;
  logic [DW-1:0] xch_addr_out, xch_data_out, xch_addr_in, xch_data_in;
  logic [MEM_AW-1:0] pc;
  logic [IW-1:0] ifetch, instr_dec;
  logic taken, mirror_wr;
  logic [1:0] fwd_top, fwd_bot;
  int checks = 0, failures = 0, n_xch = 0, n_mirror = 0, n_mirror_exp = 0, n_bn = 0, n_bn_taken = 0;

  phase_ctrl u_ph (.clk, .rst, .run, .phase, .xbar_cfg, .cycle_end, .cycles);
  dex2_half #(.IS_TOP(1'b1)) dut (
    .clk, .rst, .run, .phase, .host, .host_rdata, .peer_res(16'h0), .own_res,
    .xch_st_out, .xch_addr_out, .xch_data_out, .xch_st_in, .xch_addr_in, .xch_data_in,
    .pc, .ifetch, .instr_dec, .taken, .fwd_top, .fwd_bot, .mirror_wr);
  always #5 clk = ~clk;
  always @(posedge clk) if (mirror_wr) n_mirror++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic hw(input int i, input int a, input logic [15:0] d);
    host[i] = '{en: 1'b1, we: 1'b1, addr: 18'(a), wdata: d};
    @(negedge clk);
    host[i] = '0;
  endtask

  task automatic hr(input int i, input int a, output logic [15:0] d);
    host[i] = '{en: 1'b1, we: 1'b0, addr: 18'(a), wdata: 16'h0};
    @(negedge clk);
    host[i] = '0;
    d = host_rdata[i];
  endtask

  initial begin
    Dex2Iss iss;
    logic [15:0] d;
    logic [15:0] mir[int];
    logic [15:0] st_addr[$], st_data[$];
    logic [15:0] snaps[$][32];
    rst = 1; run = 0; host = '0; xch_st_in = 0; xch_addr_in = 0; xch_data_in = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    iss = new();
    iss.prog_t[0]  = w_imm(OP_LDI, 1, 1, 0);
    iss.prog_t[1]  = w_imm(OP_LDI, 1, 2, 0);
    iss.prog_t[2]  = w_imm(OP_LDI, 100, 9, 0);
    iss.prog_t[3]  = w_reg(OP_ADD, 1, 2, 3, 0);
    iss.prog_t[4]  = w_reg(OP_SUB, 3, 9, 4, 0);
    iss.prog_t[5]  = w_reg(OP_MV, 2, 0, 1, 0);
    iss.prog_t[6]  = w_reg(OP_MV, 3, 0, 2, 0);
    iss.prog_t[7]  = w_reg(OP_ST, 3, 1, 0, 0);
    iss.prog_t[8]  = w_br(OP_BN, 3);
    iss.prog_t[9]  = w_imm(OP_LDI, 1, 1, 0);
    iss.prog_t[10] = w_imm(OP_LDI, 1, 2, 0);
    iss.prog_t[11] = w_br(OP_BRA, 3);
    for (int a = 0; a < 12; a++) begin
      hw(0, a, iss.prog_t[a][31:16]);
      hw(1, a, iss.prog_t[a][15:0]);
    end
    for (int r = 0; r < 32; r++) begin
      logic [15:0] v;
      v = (r == 0) ? 16'h0 : 16'($urandom);
      hw(2, r, v); hw(3, r, v);
      iss.r[r] = v;
    end
    // Read-back of one register through both copies.
    hr(2, 7, d); chk(d == iss.r[7], "host read RF A");
    hr(3, 7, d); chk(d == iss.r[7], "host read RF B");

    run = 1;
    for (int c = 0; c < 120; c++) begin
      bit mirror_now;
      logic [15:0] ma, md;
      logic [31:0] w;
      chk(int'(pc) == iss.pc, $sformatf("cycle %0d pc %0d exp %0d", c, pc, iss.pc));
      w = iss.prog_t[iss.pc];
      if (w[31:27] == OP_ST) begin
        st_addr.push_back(iss.rd(int'(w[14:10])));
        st_data.push_back(iss.rd(int'(w[19:15])));
      end
      if (w[31:27] == OP_BN) begin n_bn++; end
      void'(iss.step());
      if (w[31:27] == OP_BN && iss.pc == 3) n_bn_taken++;
      snaps.push_back(iss.r);
      // Optional store from the twin, mirrored in phase 3.
      mirror_now = ($urandom_range(0, 3) == 0);
      ma = 16'($urandom_range(40000, 40100));
      md = 16'($urandom);
      for (int t = 0; t < 6; t++) begin
        xch_st_in = mirror_now && (phase == PH3);
        xch_addr_in = ma; xch_data_in = md;
        if (xch_st_out && phase == PH1) begin
          n_xch++;
          chk(st_addr.size() > 0, "store offered to twin matches a store word");
          if (st_addr.size() > 0) begin
            chk(xch_addr_out == st_addr[0] && xch_data_out == st_data[0],
                $sformatf("xch store %h<-%h exp %h<-%h", xch_addr_out, xch_data_out, st_addr[0], st_data[0]));
            void'(st_addr.pop_front()); void'(st_data.pop_front());
          end
        end
        @(negedge clk);
      end
      xch_st_in = 0;
      if (mirror_now) begin mir[ma] = md; n_mirror_exp++; end
      // After c+1 instruction cycles the first c-1 words are complete.
      if (c >= 2)
        for (int r = 1; r < 32; r++)
          chk(dut.u_decode.u_rf_a.mem[r] == snaps[c-2][r] && dut.u_decode.u_rf_b.mem[r] == snaps[c-2][r],
              $sformatf("cycle %0d R%0d=%h exp %h", c, r, dut.u_decode.u_rf_a.mem[r], snaps[c-2][r]));
    end
    chk(n_xch >= 10, $sformatf("stores offered to twin (%0d)", n_xch));
    chk(n_mirror == n_mirror_exp, $sformatf("mirrored stores (%0d)", n_mirror));
    chk(n_bn_taken > 0 && n_bn > n_bn_taken, $sformatf("BN taken %0d of %0d", n_bn_taken, n_bn));
    chk(mir.size() > 0, "some stores mirrored");
    run = 0;
    @(negedge clk);
    chk(cycles == 32'd120, $sformatf("120 instruction cycles in 720 ticks (%0d)", cycles));
    // Data memory: the words of all completed stores plus the mirrored ones.
    foreach (mir[a]) iss.m[a] = mir[a];
    foreach (iss.m[a]) begin
      if (a >= 40000 && !mir.exists(a)) continue;
      hr(5, a, d);
      chk(d == iss.m[a], $sformatf("dmem[%0d]=%h exp %h", a, d, iss.m[a]));
    end
    chk(iss.m.size() > 20, "model stored values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
