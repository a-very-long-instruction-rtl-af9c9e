// dex2_asm_pkg: small assembler helpers for Dex-II testbenches.
//
// Builds 32-bit operation words in the three formats:
//   register format  opcode[31:27] OpA[19:15] OpB[14:10] DestTop[9:5] DestBot[4:0]
//   immediate format opcode[31:27] imm[25:10]            DestTop[9:5] DestBot[4:0]
//   branch format    opcode[31:27] address[25:10]
// It also holds Dex2Iss, an instruction-level reference model of the
// VLIW machine used to predict register, memory and PC state: each 64-bit
// word reads the state left by the word before it (the pipeline forwards
// the previous result), writes Dest Top then Dest Bot, does its loads
// before its stores, and a branch tests the condition codes left by the
// add/sub-class operation of two words earlier in the same half.
// Operand conventions: LD Rx,(Ry) puts Ry in OpB; ST (Rx),Ry puts Rx (the
// address) in OpB and Ry (the data) in OpA; MV Rx,Ry puts Ry in OpA.
// The field positions follow the document's instruction formats; the
// MULT opcode (11000) and the model's conventions are this design's own.
package dex2_asm_pkg;
  import dex2_pkg::*;

  function automatic logic [31:0] w_reg(opcode_e op, int ra, int rb, int dtop, int dbot);
    return {op, 7'd0, 5'(ra), 5'(rb), 5'(dtop), 5'(dbot)};
  endfunction
  function automatic logic [31:0] w_imm(opcode_e op, int imm, int dtop, int dbot);
    return {op, 1'b0, 16'(imm), 5'(dtop), 5'(dbot)};
  endfunction
  function automatic logic [31:0] w_br(opcode_e op, int addr);
    return {op, 1'b0, 16'(addr), 10'd0};
  endfunction
  function automatic logic [31:0] w_nop(int dtop = 0, int dbot = 0);
    return {5'b00000, 17'd0, 5'(dtop), 5'(dbot)};
  endfunction

  class Dex2Iss;
    logic [15:0] r[32];
    logic [15:0] m[int];
    logic [31:0] prog_t[int];
    logic [31:0] prog_b[int];
    cc_t         cc_t_now, cc_b_now;
    cc_t         hist_t[$], hist_b[$];
    int          pc;
    int          words;

    function new();
      foreach (r[i]) r[i] = 16'h0;
      cc_t_now = '0; cc_b_now = '0; pc = 0; words = 0;
    endfunction

    function logic [15:0] rd(int i);
      return (i == 0) ? 16'h0 : r[i];
    endfunction

    function logic [15:0] mem(int a);
      return m.exists(a) ? m[a] : 16'h0;
    endfunction

    // Result and condition codes of one operation word.
    function void exec_op(input logic [31:0] w, output logic [15:0] res,
                          inout cc_t cc, output logic st, output int sa,
                          output logic [15:0] sd);
      logic [15:0] a, b;
      logic [16:0] sum;
      a = rd(int'(w[19:15])); b = rd(int'(w[14:10]));
      st = 1'b0; sa = 0; sd = 16'h0; res = 16'h0;
      sum = w[27] ? ({1'b0, a} + {1'b0, ~b} + 17'd1) : ({1'b0, a} + {1'b0, b});
      unique case (w[31:30])
        2'b00: unique case (w[31:27])
          OP_LD:   res = mem(int'(b));
          OP_LDI:  res = w[25:10];
          OP_MV:   res = a;
          OP_ST:   begin st = 1'b1; sa = int'(b); sd = a; end
          default: res = 16'h0;
        endcase
        2'b10: begin
          unique case (w[28:27])
            2'b00, 2'b01: res = sum[15:0];
            2'b10:        res = {a[14:0], 1'b0};
            default:      res = {a[15], a[15:1]};
          endcase
          cc.v = sum[16]; cc.n = res[15]; cc.z = (res == 16'h0);
        end
        2'b11: res = 16'(a[7:0]) * 16'(b[7:0]);
        default: res = 16'h0;
      endcase
    endfunction

    // Execute the word at pc; returns 1 if the halves' branches agree.
    function bit step();
      logic [31:0] wt, wb;
      logic [15:0] rt, rb, sdt, sdb;
      logic stt, stb;
      int sat, sab;
      cc_t c2t, c2b;
      bit tt, tb2;
      wt = prog_t.exists(pc) ? prog_t[pc] : 32'h0;
      wb = prog_b.exists(pc) ? prog_b[pc] : 32'h0;
      c2t = (hist_t.size() >= 2) ? hist_t[hist_t.size()-2] : cc_t'(0);
      c2b = (hist_b.size() >= 2) ? hist_b[hist_b.size()-2] : cc_t'(0);
      exec_op(wt, rt, cc_t_now, stt, sat, sdt);
      exec_op(wb, rb, cc_b_now, stb, sab, sdb);
      if (wt[9:5] != 0) r[wt[9:5]] = rt;
      if (wt[4:0] != 0) r[wt[4:0]] = rb;
      if (stt) m[sat] = sdt;
      if (stb) m[sab] = sdb;
      hist_t.push_back(cc_t_now);
      hist_b.push_back(cc_b_now);
      tt  = (wt[31:30] == 2'b01) && branch_taken(wt, c2t);
      tb2 = (wb[31:30] == 2'b01) && branch_taken(wb, c2b);
      pc = tt ? int'(wt[25:10]) : pc + 1;
      words++;
      return tt == tb2;
    endfunction
  endclass
endpackage
