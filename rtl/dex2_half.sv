// dex2_half: one processor half of the Dex-II (top: PE1-PE8, bottom:
// PE16-PE9), a complete 16-bit RISC pipeline on its own.
//
// fetch_stage -> decode_stage -> {alu_unit x2, mul_unit, mem_unit}: three
// pipeline stages, each instruction cycle six clock ticks long. The first
// add/sub unit returns its result to the decode stage, the second one only
// produces the condition codes for the fetch stage. The half talks to its
// twin through two narrow paths: the decode stages swap their results
// (peer_res / own_res) so both register files get both writes, and the
// memory managers swap their stores (xch_*) so both data memories stay
// equal. Tied off (peer_res = 0, xch_st_in = 0, Dest Bot fields = 0) a half
// runs scalar code alone.
// Host memory index: 0 imem high word, 1 imem low word, 2 register file A,
// 3 register file B, 4 multiply table, 5 data memory.
// The partitioning follows the document's PE partitioning figure.
module dex2_half
  import dex2_pkg::*;
#(
  parameter bit          IS_TOP = 1'b1,
  parameter int unsigned AW     = MEM_AW
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                run,
  input  phase_t              phase,
  input  host_req_t [5:0]     host,
  output logic [5:0][DW-1:0]  host_rdata,
  input  logic [DW-1:0]       peer_res,
  output logic [DW-1:0]       own_res,
  output logic                xch_st_out,
  output logic [DW-1:0]       xch_addr_out,
  output logic [DW-1:0]       xch_data_out,
  input  logic                xch_st_in,
  input  logic [DW-1:0]       xch_addr_in,
  input  logic [DW-1:0]       xch_data_in,
  output logic [AW-1:0]       pc,
  output logic [IW-1:0]       ifetch,
  output logic [IW-1:0]       instr_dec,   // word in the decode stage
  output logic                taken,
  output logic [1:0]          fwd_top,
  output logic [1:0]          fwd_bot,
  output logic                mirror_wr
);
  cc_t           cc_fetch;
  cc_t           cc_unused;
  logic [DW-1:0] opa, opb, alu_res, alu2_res, mul_res, mem_res;

  fetch_stage #(.AW(AW)) u_fetch (
    .clk, .rst, .run, .phase, .cc_in(cc_fetch),
    .host_hi(host[0]), .host_lo(host[1]),
    .host_rdata_hi(host_rdata[0]), .host_rdata_lo(host_rdata[1]),
    .ifetch, .pc, .taken);

  decode_stage #(.IS_TOP(IS_TOP)) u_decode (
    .clk, .rst, .run, .phase, .ifetch_in(ifetch),
    .alu_res, .mul_res, .mem_res, .peer_res, .own_res,
    .opa, .opb, .instr_out(instr_dec),
    .host_a(host[2]), .host_b(host[3]),
    .host_rdata_a(host_rdata[2]), .host_rdata_b(host_rdata[3]),
    .fwd_top, .fwd_bot);

  // Result unit (PE5 / PE12).
  alu_unit u_alu (
    .clk, .rst, .run, .phase, .opa_in(opa), .opb_in(opb), .instr_in(instr_dec),
    .result(alu_res), .cc(cc_unused));

  // Condition-code unit (PE6 / PE11).
  alu_unit u_alu_cc (
    .clk, .rst, .run, .phase, .opa_in(opa), .opb_in(opb), .instr_in(instr_dec),
    .result(alu2_res), .cc(cc_fetch));

  mul_unit #(.AW(AW)) u_mul (
    .clk, .rst, .run, .phase, .opa_in(opa), .opb_in(opb),
    .host(host[4]), .host_rdata(host_rdata[4]), .result(mul_res));

  mem_unit #(.AW(AW)) u_mem (
    .clk, .rst, .run, .phase, .opa_in(opa), .opb_in(opb), .instr_in(instr_dec),
    .host(host[5]), .host_rdata(host_rdata[5]), .result(mem_res),
    .xch_st_out, .xch_addr_out, .xch_data_out,
    .xch_st_in, .xch_addr_in, .xch_data_in, .mirror_wr);

  // The second add/sub unit's result and the first one's condition codes
  // have no consumer: both units are kept identical, as in the document.
  logic unused_ok;
  assign unused_ok = ^{alu2_res, cc_unused};
endmodule
