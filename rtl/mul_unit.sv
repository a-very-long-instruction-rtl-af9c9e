// mul_unit: 8 x 8 -> 16 bit multiply by table look-up.
//
// The product table lives in the unit's PE memory and is loaded by the host
// before a program runs: entry {a[7:0], b[7:0]} holds a*b. Operand bits
// above bit 7 are ignored. Operands are latched from the decode stage in
// phase 5; in phase 0 the two low bytes form the memory address, and in
// phase 1 the word read is registered as the result, offered to the decode
// stage from phase 2. The table method, the 8-bit operands and the phase-1
// result follow the document; placing the table at address {a,b} in the low
// 64K words is this design's choice. While halted the host reaches the
// table memory through host / host_rdata.
module mul_unit
  import dex2_pkg::*;
#(
  parameter int unsigned AW = MEM_AW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  input  phase_t        phase,
  input  logic [DW-1:0] opa_in,
  input  logic [DW-1:0] opb_in,
  input  host_req_t     host,
  output logic [DW-1:0] host_rdata,
  output logic [DW-1:0] result
);
  logic [DW-1:0] opa, opb;
  logic [DW-1:0] rd;
  logic          rd_en;

  assign rd_en = run && (phase == PH0);

  pe_sram #(.AW(AW), .DW(DW)) u_table (
    .clk, .en(host.en || rd_en), .we(host.en && host.we),
    .addr(host.en ? AW'(host.addr) : AW'({opa[7:0], opb[7:0]})),
    .wdata(host.wdata), .rdata(rd));

  assign host_rdata = rd;

  always_ff @(posedge clk) begin
    if (rst) begin
      opa <= '0; opb <= '0; result <= '0;
    end else if (run) begin
      unique case (phase)
        PH1: result <= rd;
        PH5: begin
          opa <= opa_in;
          opb <= opb_in;
        end
        default: ;
      endcase
    end
  end
endmodule
