// dex2_top: Dex-II, a two-issue VLIW processor built from two mirrored
// 16-bit RISC halves that run in lock step.
//
// A 64-bit VLIW instruction is stored as two 32-bit operation words, one in
// each half's instruction memories at the same address. Each half fetches,
// decodes and executes its own word; the halves stay consistent because
// every word carries both destination registers, the decode stages swap
// results each cycle (so all four register-file copies receive both
// writes), and the memory managers swap stores (so both data memories
// receive both stores). Branches are executed by both halves, each with its
// own PC and condition codes: the program must issue the same branch and
// the same compare in both words. The phase controller divides the clock
// into six-tick instruction cycles; xbar_cfg is the crossbar configuration
// the board would use in each phase.
// Host port: with run=0 the host reads or writes any PE memory, host_pe
// numbered as on the board (1,2 fetch; 3,4 decode; 7 multiply table;
// 8 data memory; mirrored 16,15,14,13,10,9 for the bottom half); read data
// appears on host_rdata two ticks after the request. PEs 5, 6, 11 and 12
// use no memory and read as zero.
// Assertions check the coherence rules the program must keep: equal
// destination fields and equal PCs in both halves, and no two different
// values stored to one address by the two words of an instruction.
// The split into halves and PEs, the result and store exchange and the
// six-phase cycle follow the document; the host port, its timing, the
// direct wiring in place of the crossbar and the assertions are this
// design's own.
module dex2_top
  import dex2_pkg::*;
#(
  parameter int unsigned AW = MEM_AW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  input  logic          host_en,
  input  logic          host_we,
  input  logic [4:0]    host_pe,
  input  logic [17:0]   host_addr,
  input  logic [DW-1:0] host_wdata,
  output logic [DW-1:0] host_rdata,
  output phase_t        phase,
  output logic [2:0]    xbar_cfg,
  output logic [31:0]   cycles,
  output logic [AW-1:0] pc_top,
  output logic [AW-1:0] pc_bot,
  output logic          taken_top,
  output logic          taken_bot
);
  logic                cycle_end;
  host_req_t [5:0]     h_top, h_bot;
  logic [5:0][DW-1:0]  rd_top, rd_bot;
  logic [DW-1:0]       res_top, res_bot;
  logic                st_t, st_b;
  logic [DW-1:0]       sa_t, sd_t, sa_b, sd_b;
  logic [IW-1:0]       if_top, if_bot, id_top, id_bot;
  logic [1:0]          ft_t, fb_t, ft_b, fb_b;
  logic                mw_t, mw_b;
  logic [4:0]          pe_q, pe_qq;

  phase_ctrl u_phase (.clk, .rst, .run, .phase, .xbar_cfg, .cycle_end, .cycles);

  // Host request decode: board PE number -> (half, memory index).
  function automatic int pe_index(input logic [4:0] pe, input bit top);
    if (top) begin
      unique case (pe)
        5'd1: return 0;  5'd2: return 1;  5'd3: return 2;
        5'd4: return 3;  5'd7: return 4;  5'd8: return 5;
        default: return -1;
      endcase
    end else begin
      unique case (pe)
        5'd16: return 0; 5'd15: return 1; 5'd14: return 2;
        5'd13: return 3; 5'd10: return 4; 5'd9:  return 5;
        default: return -1;
      endcase
    end
  endfunction

  always_comb begin
    for (int i = 0; i < 6; i++) begin
      h_top[i].en    = host_en && (pe_index(host_pe, 1'b1) == i);
      h_bot[i].en    = host_en && (pe_index(host_pe, 1'b0) == i);
      h_top[i].we    = host_we;
      h_bot[i].we    = host_we;
      h_top[i].addr  = host_addr;
      h_bot[i].addr  = host_addr;
      h_top[i].wdata = host_wdata;
      h_bot[i].wdata = host_wdata;
    end
  end

  dex2_half #(.IS_TOP(1'b1), .AW(AW)) u_top (
    .clk, .rst, .run, .phase, .host(h_top), .host_rdata(rd_top),
    .peer_res(res_bot), .own_res(res_top),
    .xch_st_out(st_t), .xch_addr_out(sa_t), .xch_data_out(sd_t),
    .xch_st_in(st_b), .xch_addr_in(sa_b), .xch_data_in(sd_b),
    .pc(pc_top), .ifetch(if_top), .instr_dec(id_top), .taken(taken_top),
    .fwd_top(ft_t), .fwd_bot(fb_t), .mirror_wr(mw_t));

  dex2_half #(.IS_TOP(1'b0), .AW(AW)) u_bot (
    .clk, .rst, .run, .phase, .host(h_bot), .host_rdata(rd_bot),
    .peer_res(res_top), .own_res(res_bot),
    .xch_st_out(st_b), .xch_addr_out(sa_b), .xch_data_out(sd_b),
    .xch_st_in(st_t), .xch_addr_in(sa_t), .xch_data_in(sd_t),
    .pc(pc_bot), .ifetch(if_bot), .instr_dec(id_bot), .taken(taken_bot),
    .fwd_top(ft_b), .fwd_bot(fb_b), .mirror_wr(mw_b));

  // Host read data: the memory answers one tick after the request; it is
  // registered once more here.
  always_ff @(posedge clk) begin
    if (rst) begin
      pe_q <= '0; pe_qq <= '0; host_rdata <= '0;
    end else begin
      pe_q <= host_pe;
      pe_qq <= pe_q;
      if (pe_index(pe_q, 1'b1) >= 0)      host_rdata <= rd_top[pe_index(pe_q, 1'b1)];
      else if (pe_index(pe_q, 1'b0) >= 0) host_rdata <= rd_bot[pe_index(pe_q, 1'b0)];
      else                                host_rdata <= '0;
    end
  end

  // Coherence rules of the instruction stream (kept by the program).
  always_ff @(posedge clk) begin
    if (!rst && run && cycle_end) begin
      assert (f_dtop(id_top) == f_dtop(id_bot) && f_dbot(id_top) == f_dbot(id_bot))
        else $error("dex2: destination fields differ between halves");
      assert (pc_top == pc_bot)
        else $error("dex2: program counters of the halves diverged");
    end
    if (!rst && run && phase == PH0 && st_t && st_b && sa_t == sa_b)
      assert (sd_t == sd_b)
        else $error("dex2: both halves store different values to %h", sa_t);
  end

  logic unused_ok;
  assign unused_ok = ^{if_top, if_bot, ft_t, fb_t, ft_b, fb_b, mw_t, mw_b, pe_qq};
endmodule
