// tb_alu_unit: random ADD/SUB/SFTL/SFTR operations through the six-phase
// schedule; checks the phase-0 result and the phase-1 condition codes
// against values computed here, and that non-ALU words hold the codes.
// The bench plays the decode stage: it presents operands and the word in
// phase 5 and samples after phases 0 and 1. Expected values follow the
// document's flag rules (N = bit 15, Z = zero, V = carry out); SUB as
// a + ~b + 1 and one-place shifts are this design's reading.
module tb_alu_unit;
  import dex2_pkg::*;
  import dex2_asm_pkg::*;
  logic clk = 1'b0, rst, run;
  phase_t phase;
  logic [15:0] opa_in, opb_in, result;
  logic [31:0] instr_in;
  cc_t cc;
  int checks = 0, failures = 0;

  alu_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  // One instruction cycle: load at phase 5, compute in the next cycle.
  task automatic issue(input logic [31:0] w, input logic [15:0] a, input logic [15:0] b);
    opa_in = a; opb_in = b; instr_in = w;
    phase = PH5; @(negedge clk);
    phase = PH0; @(negedge clk);
    phase = PH1; @(negedge clk);
    phase = PH2;
  endtask

  initial begin
    opcode_e ops[4] = '{OP_ADD, OP_SUB, OP_SFTL, OP_SFTR};
    logic [16:0] s;
    logic [15:0] e;
    logic        v;
    cc_t prev;
    rst = 1; run = 1; phase = PH0; opa_in = 0; opb_in = 0; instr_in = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic opcode_e op = ops[$urandom_range(3)];
      automatic logic [15:0] a = (i % 7 == 0) ? 16'h0 : 16'($urandom);
      automatic logic [15:0] b = (i % 5 == 0) ? a : 16'($urandom);
      v = 1'b0;
      unique case (op)
        OP_ADD:  begin s = {1'b0, a} + {1'b0, b}; e = s[15:0]; v = s[16]; end
        OP_SUB:  begin s = {1'b0, a} + {1'b0, ~b} + 17'd1; e = s[15:0]; v = s[16]; end
        OP_SFTL: begin e = a << 1; s = {1'b0, a} + {1'b0, a}; v = s[16]; end
        default: begin e = $signed(a) >>> 1; s = {1'b0, a} + {1'b0, b}; v = s[16]; end
      endcase
      issue(w_reg(op, 1, 2, 3, 0), a, b);
      chk(result == e, $sformatf("%s %h %h -> %h exp %h", op.name(), a, b, result, e));
      if (op == OP_ADD || op == OP_SUB)
        chk(cc.v == v, "V flag");
      chk(cc.n == e[15] && cc.z == (e == 0), "N/Z flags");
      // A memory-class word must not change the condition codes.
      if (i % 10 == 0) begin
        prev = cc;
        issue(w_imm(OP_LDI, 16'($urandom), 3, 0), 16'($urandom), 16'($urandom));
        chk(cc == prev, "codes held over LDI");
      end
    end
    // Halted: nothing changes.
    run = 0; prev = cc;
    issue(w_reg(OP_ADD, 1, 2, 3, 0), 16'hffff, 16'h0001);
    chk(cc == prev, "halted unit holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
