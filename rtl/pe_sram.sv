// pe_sram: the 256K x 16 memory attached to each processing element.
//
// Single port. A read takes two clock ticks: the address is latched on the
// first edge (en=1, we=0) and the word appears on rdata after it, valid until
// the next read. A write presents address and data together (en=1, we=1)
// and is done on that edge. Depth and width follow the document (18 address
// and 16 data lines); contents are not reset, as in a real SRAM, and are
// loaded by the host before a program runs.
module pe_sram #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
