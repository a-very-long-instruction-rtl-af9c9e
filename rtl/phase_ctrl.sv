// phase_ctrl: six-phase instruction-cycle sequencer (crossbar control PE).
//
// Every processing element divides the global clock into six phases; the
// crossbar controller counts the same phases and selects crossbar
// configuration number = phase, so that each phase connects a different set
// of PEs. Here one counter serves the whole design. It counts 0..5 while
// run=1 and holds at phase 0 while run=0 (processor halted for host access).
// cycle_end is high in phase 5, the tick on which all pipeline registers
// advance, and cycles counts completed instruction cycles.
// Interface: clk, rst, run in; phase, xbar_cfg, cycle_end, cycles out.
// The six-phase division follows the document (it numbers the phases 1..6);
// the single shared counter, the hold while halted and the cycle counter
// are this design's own choices.
module phase_ctrl
  import dex2_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  output phase_t      phase,
  output logic [2:0]  xbar_cfg,
  output logic        cycle_end,
  output logic [31:0] cycles
);
  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= PH0;
      cycles <= '0;
    end else if (run) begin
      if (phase == PH5) begin
        phase  <= PH0;
        cycles <= cycles + 32'd1;
      end else begin
        phase  <= phase + 3'd1;
      end
    end else begin
      phase <= PH0;
    end
  end

  assign xbar_cfg  = phase;
  assign cycle_end = run && (phase == PH5);
endmodule
