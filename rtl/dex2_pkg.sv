// dex2_pkg: shared types and constants of the Dex-II two-issue VLIW processor.
//
// Each of the two processor halves executes one 32-bit operation word per
// instruction cycle; the pair of words forms the 64-bit VLIW instruction.
// An instruction cycle is six global clock ticks ("phases" 0..5). The opcode
// values, field positions and the 16-bit data path follow the document; the
// MULT opcode value, the host access bundle and the condition-code decode of
// the branch opcodes are this design's own choices (see the README).
package dex2_pkg;

  localparam int unsigned DW       = 16;  // data path width
  localparam int unsigned IW       = 32;  // one operation word
  localparam int unsigned MEM_AW   = 18;  // PE memory: 256K x 16
  localparam int unsigned RF_AW    = 5;   // 32 registers, R0 reads as zero

  typedef logic [2:0] phase_t;

  // Five-bit opcodes, bits 31..27 of the operation word.
  typedef enum logic [4:0] {
    OP_NOP  = 5'b00000,
    OP_LD   = 5'b00100,
    OP_LDI  = 5'b00101,
    OP_ST   = 5'b00110,
    OP_MV   = 5'b00111,
    OP_BRA  = 5'b01000,
    OP_BZ   = 5'b01001,
    OP_BN   = 5'b01010,
    OP_BNZ  = 5'b01011,
    OP_BNV  = 5'b01100,
    OP_ADD  = 5'b10000,
    OP_SUB  = 5'b10001,
    OP_SFTL = 5'b10010,
    OP_SFTR = 5'b10011,
    OP_MULT = 5'b11000
  } opcode_e;

  // Top two opcode bits select which execution unit produces the result.
  localparam logic [1:0] CLS_MEM    = 2'b00;  // NOP, LD, LDI, ST, MV
  localparam logic [1:0] CLS_BRANCH = 2'b01;
  localparam logic [1:0] CLS_ALU    = 2'b10;
  localparam logic [1:0] CLS_MUL    = 2'b11;

  // Condition codes: V (carry out of the add/sub unit), N, Z.
  typedef struct packed {
    logic v;
    logic n;
    logic z;
  } cc_t;

  // Operation word fields (three formats share the destination fields).
  function automatic logic [4:0] f_opcode(input logic [IW-1:0] w); return w[31:27]; endfunction
  function automatic logic [1:0] f_class (input logic [IW-1:0] w); return w[31:30]; endfunction
  function automatic logic [4:0] f_opa   (input logic [IW-1:0] w); return w[19:15]; endfunction
  function automatic logic [4:0] f_opb   (input logic [IW-1:0] w); return w[14:10]; endfunction
  function automatic logic [15:0] f_imm  (input logic [IW-1:0] w); return w[25:10]; endfunction
  function automatic logic [4:0] f_dtop  (input logic [IW-1:0] w); return w[9:5];   endfunction
  function automatic logic [4:0] f_dbot  (input logic [IW-1:0] w); return w[4:0];   endfunction

  // Branch resolution: BRA always; the conditional branches test the
  // condition codes produced by the add/sub unit.
  function automatic logic branch_taken(input logic [IW-1:0] w, input cc_t cc);
    case (w[31:27])
      OP_BRA:  return 1'b1;
      OP_BZ:   return cc.z;
      OP_BN:   return cc.n;
      OP_BNZ:  return cc.n | cc.z;
      OP_BNV:  return cc.n | cc.v;
      default: return 1'b0;
    endcase
  endfunction

  // Host (debugger) access to one PE memory while the processor is halted.
  typedef struct packed {
    logic              en;
    logic              we;
    logic [MEM_AW-1:0] addr;
    logic [DW-1:0]     wdata;
  } host_req_t;

  // Phase numbers (the document counts them 1..6).
  localparam phase_t PH0 = 3'd0;
  localparam phase_t PH1 = 3'd1;
  localparam phase_t PH2 = 3'd2;
  localparam phase_t PH3 = 3'd3;
  localparam phase_t PH4 = 3'd4;
  localparam phase_t PH5 = 3'd5;

endpackage
