// tb_decode_stage: random operation words and execution results; checks
// operand read, forwarding from the top and bottom results (bottom wins),
// the 4-1 result mux, R0, the two writebacks and the Id/Ix shift against a
// register-file model. Run for both the top and the bottom variant.
// The bench plays the fetch stage, the execute units and the other half:
// it drives ifetch_in and all four results each cycle and compares opa/opb
// after phase 3 and the register copies after phase 4. The schedule checked
// is the document's; the bottom-wins order is this design's reading.
module tb_decode_stage;
  import dex2_pkg::*;
  import dex2_asm_pkg::*;
  logic clk = 1'b0, rst, run;
  phase_t phase;
  logic [31:0] ifetch_in, instr_out;
  logic [15:0] alu_res, mul_res, mem_res, peer_res, own_res, opa, opb;
  logic [15:0] host_rdata_a, host_rdata_b;
  host_req_t host_a, host_b;
  logic [1:0] fwd_top, fwd_bot;
  int checks = 0, failures = 0, n_ft = 0, n_fb = 0;

  decode_stage #(.IS_TOP(1'b1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  always @(posedge clk) begin
    if (|fwd_top) n_ft++;
    if (|fwd_bot) n_fb++;
  end

  initial begin
    logic [15:0] rf [32];
    logic [31:0] idm, ixm;
    opcode_e ops[6] = '{OP_ADD, OP_MULT, OP_LD, OP_LDI, OP_BRA, OP_MV};
    rst = 1; run = 0; phase = PH0; ifetch_in = 0;
    alu_res = 0; mul_res = 0; mem_res = 0; peer_res = 0; host_a = '0; host_b = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 32; r++) begin
      rf[r] = 16'($urandom);
      host_a = '{en: 1'b1, we: 1'b1, addr: 18'(r), wdata: rf[r]};
      host_b = host_a;
      @(negedge clk);
    end
    host_a = '0; host_b = '0;
    rf[0] = 16'h0;
    run = 1; idm = 0; ixm = 0;
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] w;
      logic [15:0] rtop, rbot, ea, eb, emux;
      int sa, sb;
      // Sources and destinations drawn from a few registers so that
      // forwarding happens often.
      w = w_reg(ops[$urandom_range(5)], $urandom_range(5), $urandom_range(5),
                $urandom_range(5), $urandom_range(5));
      ifetch_in = w;
      alu_res = 16'($urandom); mul_res = 16'($urandom);
      mem_res = 16'($urandom); peer_res = 16'($urandom);
      unique case (ixm[31:30])
        2'b00: emux = mem_res;
        2'b10: emux = alu_res;
        2'b11: emux = mul_res;
        default: emux = 16'h0;
      endcase
      // Both halves may name one register only with one value.
      if (ixm[9:5] != 0 && ixm[9:5] == ixm[4:0]) peer_res = emux;
      rtop = emux; rbot = peer_res;
      sa = int'(idm[19:15]); sb = int'(idm[14:10]);
      ea = rf[sa]; eb = rf[sb];
      if (ixm[9:5] != 0 && int'(ixm[9:5]) == sa) ea = rtop;
      if (ixm[4:0] != 0 && int'(ixm[4:0]) == sa) ea = rbot;
      if (ixm[9:5] != 0 && int'(ixm[9:5]) == sb) eb = rtop;
      if (ixm[4:0] != 0 && int'(ixm[4:0]) == sb) eb = rbot;
      phase = PH0; @(negedge clk);
      phase = PH1; @(negedge clk);
      phase = PH2; @(negedge clk);
      chk(own_res == emux, "result mux");
      phase = PH3; @(negedge clk);
      chk(opa == ea && opb == eb, $sformatf("n=%0d operands %h %h exp %h %h", n, opa, opb, ea, eb));
      phase = PH4; @(negedge clk);
      phase = PH5;
      chk(instr_out == idm, "instr_out is Id");
      @(negedge clk);
      if (ixm[9:5] != 0) rf[ixm[9:5]] = rtop;
      if (ixm[4:0] != 0) rf[ixm[4:0]] = rbot;
      ixm = idm; idm = w;
    end
    run = 0;
    for (int r = 1; r < 32; r++) begin
      host_a = '{en: 1'b1, we: 1'b0, addr: 18'(r), wdata: 16'h0};
      host_b = host_a;
      @(negedge clk);
      chk(host_rdata_a == rf[r] && host_rdata_b == rf[r], $sformatf("final R%0d", r));
    end
    host_a = '0; host_b = '0;
    chk(n_ft > 100 && n_fb > 100, "both forwarding paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
