// fetch_stage: instruction fetch and branch unit of one processor half
// (the two fetch PEs).
//
// The 32-bit operation word is kept in two 16-bit PE memories: imem_hi holds
// bits 31..16 and imem_lo bits 15..0 at the same address. Per instruction
// cycle:
//   phase 0  both memories latch the address PC
//   phase 1  the two halves are joined into ifetch (held for the decode stage)
//   phase 2  the condition codes sent by the add/sub unit are latched
//   phase 3  PC <- ifetch[25:10] if ifetch is a taken branch, else PC + 1
// Because the PC is updated in the same cycle as the branch word is fetched,
// the next word fetched is already the target: there is no delay slot. The
// condition codes latched in phase 2 belong to the operation that is in the
// execute stage at that time, i.e. two words ahead of the branch, which is
// why a compare must precede its branch by one instruction.
// While halted (run=0) the host reads and writes the two memories through
// host_hi / host_lo; read data appears on the *_rdata outputs one tick later.
// The schedule follows the document; reset values and the condition decode
// of the branch opcodes (dex2_pkg::branch_taken) are this design's choices.
module fetch_stage
  import dex2_pkg::*;
#(
  parameter int unsigned AW = MEM_AW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  input  phase_t        phase,
  input  cc_t           cc_in,
  input  host_req_t     host_hi,
  input  host_req_t     host_lo,
  output logic [DW-1:0] host_rdata_hi,
  output logic [DW-1:0] host_rdata_lo,
  output logic [IW-1:0] ifetch,
  output logic [AW-1:0] pc,
  output logic          taken      // pulses in phase 3 when a branch is taken
);
  cc_t           cc_q;
  logic [DW-1:0] rd_hi, rd_lo;
  logic          rd_en;
  logic          br;

  assign rd_en = run && (phase == PH0);

  pe_sram #(.AW(AW), .DW(DW)) u_imem_hi (
    .clk, .en(host_hi.en || rd_en), .we(host_hi.en && host_hi.we),
    .addr(host_hi.en ? AW'(host_hi.addr) : pc), .wdata(host_hi.wdata), .rdata(rd_hi));
  pe_sram #(.AW(AW), .DW(DW)) u_imem_lo (
    .clk, .en(host_lo.en || rd_en), .we(host_lo.en && host_lo.we),
    .addr(host_lo.en ? AW'(host_lo.addr) : pc), .wdata(host_lo.wdata), .rdata(rd_lo));

  assign host_rdata_hi = rd_hi;
  assign host_rdata_lo = rd_lo;

  assign br    = (f_class(ifetch) == CLS_BRANCH) && branch_taken(ifetch, cc_q);
  assign taken = run && (phase == PH3) && br;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= '0;
      ifetch <= '0;
      cc_q   <= '0;
    end else if (run) begin
      unique case (phase)
        PH1: ifetch <= {rd_hi, rd_lo};
        PH2: cc_q   <= cc_in;
        PH3: pc     <= br ? AW'(f_imm(ifetch)) : pc + AW'(1);
        default: ;
      endcase
    end
  end
endmodule
