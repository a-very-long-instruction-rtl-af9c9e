// mem_unit: memory manager of one processor half.
//
// Executes the memory-class operations on the half's 256K x 16 data memory
// and keeps it identical to the other half's copy:
//   LD   Rx <- (Ry)   address = operand B, result = word read
//   LDI  Rx <- imm    result = instruction bits 25..10
//   MV   Rx <- Ry     result = operand A
//   ST   (Rx) <- Ry   address = operand B, data = operand A
// Timing per instruction cycle: phase 5 of the previous cycle latches the
// operands and operation word; phase 0 presents the address and writes if
// the operation is ST, otherwise reads; phase 1 registers the result, which
// the decode stage picks up from phase 2. The store (or non-store) of this
// half is offered to the other half on xch_out for the whole cycle; in
// phase 3 a store received on xch_in is written into this memory too, so
// both memories see both stores. Two stores to one address in the same
// instruction leave the copies different: programs must not do that.
// The phase schedule follows the document; the result of a non-memory
// operation (zero) is this design's choice.
module mem_unit
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
  input  logic [IW-1:0] instr_in,
  input  host_req_t     host,
  output logic [DW-1:0] host_rdata,
  output logic [DW-1:0] result,
  // store exchange with the other half's memory manager
  output logic          xch_st_out,
  output logic [DW-1:0] xch_addr_out,
  output logic [DW-1:0] xch_data_out,
  input  logic          xch_st_in,
  input  logic [DW-1:0] xch_addr_in,
  input  logic [DW-1:0] xch_data_in,
  output logic          mirror_wr     // pulses when a peer store is mirrored
);
  logic [DW-1:0] opa, opb;
  logic [IW-1:0] ix;
  logic [DW-1:0] rd;
  logic          is_st;
  logic          m_en, m_we;
  logic [AW-1:0] m_addr;
  logic [DW-1:0] m_wdata;

  assign is_st = (f_opcode(ix) == OP_ST);

  always_comb begin
    m_en = 1'b0; m_we = 1'b0; m_addr = AW'(opb); m_wdata = opa;
    if (host.en) begin
      m_en = 1'b1; m_we = host.we; m_addr = AW'(host.addr); m_wdata = host.wdata;
    end else if (run && phase == PH0) begin
      m_en = 1'b1; m_we = is_st;
    end else if (run && phase == PH3 && xch_st_in) begin
      m_en = 1'b1; m_we = 1'b1; m_addr = AW'(xch_addr_in); m_wdata = xch_data_in;
    end
  end

  pe_sram #(.AW(AW), .DW(DW)) u_dmem (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(rd));

  assign host_rdata   = rd;
  assign xch_st_out   = is_st;
  assign xch_addr_out = opb;
  assign xch_data_out = opa;
  assign mirror_wr    = run && (phase == PH3) && xch_st_in && !host.en;

  always_ff @(posedge clk) begin
    if (rst) begin
      opa <= '0; opb <= '0; ix <= '0; result <= '0;
    end else if (run) begin
      unique case (phase)
        PH1: begin
          unique case (f_opcode(ix))
            OP_LD:   result <= rd;
            OP_LDI:  result <= f_imm(ix);
            OP_MV:   result <= opa;
            default: result <= '0;
          endcase
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
