// alu_unit: add/subtract/shift execution unit with condition codes.
//
// Operands and the operation word are latched from the decode stage in
// phase 5 of the previous instruction cycle. In phase 0 the unit computes
//   ADD  a + b        SUB  a - b
//   SFTL a << 1       SFTR a >> 1 (sign bit kept)
// selected by opcode bits 28..27, and registers result and carry out; the
// result is offered to the decode stage from phase 1 on. In phase 1 the
// condition codes are set from it: N = result[15], Z = (result == 0),
// V = carry out of the 16-bit adder (for SUB the carry of a + ~b + 1).
// They are updated only by add/sub-class operations and otherwise held.
// Each half has two of these units fed with the same operands: one returns
// the result to the decode stage, the other only supplies condition codes
// to the fetch stage, as in the document. The arithmetic right shift and
// the carry-as-overflow flag follow the document; holding the codes over
// other operations is this design's choice.
module alu_unit
  import dex2_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  input  phase_t        phase,
  input  logic [DW-1:0] opa_in,
  input  logic [DW-1:0] opb_in,
  input  logic [IW-1:0] instr_in,
  output logic [DW-1:0] result,
  output cc_t           cc
);
  logic [DW-1:0] opa, opb;
  logic [IW-1:0] ix;
  logic          carry_q;
  logic [DW:0]   sum;
  logic [DW-1:0] res_c;

  always_comb begin
    sum = ix[27] ? ({1'b0, opa} + {1'b0, ~opb} + (DW+1)'(1))
                 : ({1'b0, opa} + {1'b0, opb});
    unique case (ix[28:27])
      2'b00, 2'b01: res_c = sum[DW-1:0];
      2'b10:        res_c = {opa[DW-2:0], 1'b0};
      default:      res_c = {opa[DW-1], opa[DW-1:1]};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      opa <= '0; opb <= '0; ix <= '0;
      result <= '0; carry_q <= 1'b0; cc <= '0;
    end else if (run) begin
      unique case (phase)
        PH0: begin
          result  <= res_c;
          carry_q <= sum[DW];
        end
        PH1: if (f_class(ix) == CLS_ALU) begin
          cc.v <= carry_q;
          cc.n <= result[DW-1];
          cc.z <= (result == '0);
        end
        PH5: begin
          opa <= opa_in;
          opb <= opb_in;
          ix  <= instr_in;
        end
        default: ;
      endcase
    end
  end
endmodule
