// decode_stage: decode, operand forwarding and writeback of one processor
// half (the two decode PEs).
//
// The register file is kept twice, once per decode PE: copy A supplies
// operand A (bits 19..15 of the word), copy B operand B (bits 14..10). Both
// copies receive every write, so they stay identical. Each operation word
// carries the destinations of both halves, Dest Top (9..5) and Dest Bot
// (4..0); a half writes its own result to its own destination field and the
// other half's result, received on peer_res, to the other field.
// Id holds the word being decoded, Ix the word in the execute stage.
// Per instruction cycle:
//   phase 0  read both register copies at the source fields of Id
//   phase 1  latch operands (R0 reads as zero)
//   phase 2  latch this half's result through the 4-1 mux, selected by
//            Ix[31:30]: 00 memory unit, 01 none (branch), 10 add/sub,
//            11 multiplier; it is offered to the other half on own_res
//   phase 3  forwarding: an operand whose source equals Dest Top or Dest
//            Bot of Ix (not R0) is replaced by that result (Dest Bot last,
//            so it wins); write the top result to Dest Top unless R0
//   phase 4  write the bottom result to Dest Bot unless R0
//   phase 5  Ix <- Id, Id <- ifetch_in; the execute units latch opa/opb and
//            Id (instr_out) on the same edge
// A word depending on the word just before it thus gets its operand by
// forwarding; one depending on a word two earlier reads the written file.
// The schedule and the forwarding rule follow the document; the register
// file contents are not reset (the host or the program initialises them),
// and the forward of a Dest of R0 is suppressed, which is this design's
// reading of R0 as a constant zero. An assertion flags a word pair that
// writes one register with two different values.
module decode_stage
  import dex2_pkg::*;
#(
  parameter bit IS_TOP = 1'b1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  input  phase_t        phase,
  input  logic [IW-1:0] ifetch_in,
  input  logic [DW-1:0] alu_res,
  input  logic [DW-1:0] mul_res,
  input  logic [DW-1:0] mem_res,
  input  logic [DW-1:0] peer_res,
  output logic [DW-1:0] own_res,
  output logic [DW-1:0] opa,
  output logic [DW-1:0] opb,
  output logic [IW-1:0] instr_out,
  input  host_req_t     host_a,
  input  host_req_t     host_b,
  output logic [DW-1:0] host_rdata_a,
  output logic [DW-1:0] host_rdata_b,
  output logic [1:0]    fwd_top,     // phase 3: operand A/B forwarded from the top result
  output logic [1:0]    fwd_bot      // phase 3: operand A/B forwarded from the bottom result
);
  logic [IW-1:0] id, ix;
  logic [DW-1:0] rd_a, rd_b;
  logic [DW-1:0] mux_res, res_top, res_bot;
  logic [DW-1:0] opa_fwd, opb_fwd;
  logic          rf_en, rf_we;
  logic [4:0]    rf_wa;
  logic [DW-1:0] rf_wd;
  logic [4:0]    dtop, dbot, sa, sb;

  assign dtop = f_dtop(ix);
  assign dbot = f_dbot(ix);
  assign sa   = f_opa(id);
  assign sb   = f_opb(id);

  always_comb begin
    unique case (f_class(ix))
      CLS_MEM:    mux_res = mem_res;
      CLS_ALU:    mux_res = alu_res;
      CLS_MUL:    mux_res = mul_res;
      default:    mux_res = '0;
    endcase
  end

  assign res_top = IS_TOP ? own_res : peer_res;
  assign res_bot = IS_TOP ? peer_res : own_res;

  always_comb begin
    fwd_top = '0;
    fwd_bot = '0;
    opa_fwd = opa;
    opb_fwd = opb;
    if (dtop != '0 && dtop == sa) begin opa_fwd = res_top; fwd_top[0] = 1'b1; end
    if (dbot != '0 && dbot == sa) begin opa_fwd = res_bot; fwd_bot[0] = 1'b1; end
    if (dtop != '0 && dtop == sb) begin opb_fwd = res_top; fwd_top[1] = 1'b1; end
    if (dbot != '0 && dbot == sb) begin opb_fwd = res_bot; fwd_bot[1] = 1'b1; end
    if (!(run && phase == PH3)) begin
      fwd_top = '0;
      fwd_bot = '0;
    end
  end

  // Register-file port schedule: read in phase 0, write in phases 3 and 4.
  always_comb begin
    rf_en = 1'b0; rf_we = 1'b0; rf_wa = '0; rf_wd = res_top;
    if (run) begin
      unique case (phase)
        PH0: rf_en = 1'b1;
        PH3: begin rf_en = (dtop != '0); rf_we = 1'b1; rf_wa = dtop; rf_wd = res_top; end
        PH4: begin rf_en = (dbot != '0); rf_we = 1'b1; rf_wa = dbot; rf_wd = res_bot; end
        default: ;
      endcase
    end
  end

  pe_sram #(.AW(RF_AW), .DW(DW)) u_rf_a (
    .clk,
    .en   (host_a.en || rf_en),
    .we   (host_a.en ? host_a.we : rf_we),
    .addr (host_a.en ? host_a.addr[RF_AW-1:0] : (rf_we ? rf_wa : sa)),
    .wdata(host_a.en ? host_a.wdata : rf_wd),
    .rdata(rd_a));
  pe_sram #(.AW(RF_AW), .DW(DW)) u_rf_b (
    .clk,
    .en   (host_b.en || rf_en),
    .we   (host_b.en ? host_b.we : rf_we),
    .addr (host_b.en ? host_b.addr[RF_AW-1:0] : (rf_we ? rf_wa : sb)),
    .wdata(host_b.en ? host_b.wdata : rf_wd),
    .rdata(rd_b));

  assign host_rdata_a = rd_a;
  assign host_rdata_b = rd_b;
  assign instr_out    = id;

  always_ff @(posedge clk) begin
    if (rst) begin
      id <= '0; ix <= '0; opa <= '0; opb <= '0; own_res <= '0;
    end else if (run) begin
      unique case (phase)
        PH1: begin
          opa <= (sa == '0) ? '0 : rd_a;
          opb <= (sb == '0) ? '0 : rd_b;
        end
        PH2: own_res <= mux_res;
        PH3: begin
          opa <= opa_fwd;
          opb <= opb_fwd;
        end
        PH5: begin
          ix <= id;
          id <= ifetch_in;
        end
        default: ;
      endcase
    end
  end

  // Both halves writing one register with different values leaves the
  // register files of the two halves different: the program must avoid it.
  always_ff @(posedge clk) begin
    if (!rst && run && phase == PH3 && dtop != '0 && dtop == dbot)
      assert (res_top == res_bot)
        else $error("dex2: both halves write R%0d with different values", dtop);
  end
endmodule
