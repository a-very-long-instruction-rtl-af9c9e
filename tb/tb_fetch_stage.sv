// tb_fetch_stage: random programs of branch and non-branch words with
// random condition codes; checks the fetched word, the PC after each
// instruction cycle (target or PC+1) and the taken pulse against a model.
// The bench loads the two instruction memories through the host ports,
// drives cc_in with the true codes only in phase 2 (inverted otherwise, so
// a wrong latch phase is caught) and checks the branch decision with the
// condition decode chosen for this design (BNZ: N or Z, BNV: N or V).
module tb_fetch_stage;
  import dex2_pkg::*;
  import dex2_asm_pkg::*;
  localparam int AW = 8;
  logic clk = 1'b0, rst, run;
  phase_t phase;
  cc_t cc_in;
  host_req_t host_hi, host_lo;
  logic [15:0] host_rdata_hi, host_rdata_lo;
  logic [31:0] ifetch;
  logic [AW-1:0] pc;
  logic taken;
  int checks = 0, failures = 0, n_taken = 0, n_not = 0;
  logic [31:0] prog [256];

  fetch_stage #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    opcode_e brs[5] = '{OP_BRA, OP_BZ, OP_BN, OP_BNZ, OP_BNV};
    int pcm;
    rst = 1; run = 0; phase = PH0; cc_in = '0; host_hi = '0; host_lo = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 256; i++) begin
      if ($urandom_range(2) == 0) prog[i] = w_br(brs[$urandom_range(4)], $urandom_range(255));
      else prog[i] = w_reg(OP_ADD, $urandom_range(31), $urandom_range(31), 3, 0);
      host_hi.en = 1; host_hi.we = 1; host_hi.addr = 18'(i); host_hi.wdata = prog[i][31:16];
      host_lo.en = 1; host_lo.we = 1; host_lo.addr = 18'(i); host_lo.wdata = prog[i][15:0];
      @(negedge clk);
    end
    host_hi = '0; host_lo = '0;
    // Host read-back.
    host_lo.en = 1; host_lo.addr = 18'd7;
    @(negedge clk);
    host_lo = '0;
    chk(host_rdata_lo == prog[7][15:0], "host read");
    run = 1;
    pcm = 0;
    for (int n = 0; n < 3000; n++) begin
      cc_t c;
      logic exp_tk;
      c = cc_t'($urandom_range(7));
      cc_in = ~c;  // only the value present in phase 2 may count
      phase = PH0; @(negedge clk);
      phase = PH1; @(negedge clk);
      chk(ifetch == prog[pcm], $sformatf("ifetch at pc %0d", pcm));
      cc_in = c;
      phase = PH2; @(negedge clk);
      cc_in = ~c;
      phase = PH3;
      exp_tk = (ifetch[31:30] == 2'b01) && branch_taken(ifetch, c);
      #1 chk(taken == exp_tk, "taken pulse");
      @(negedge clk);
      if (exp_tk) begin pcm = int'(prog[pcm][17:10]); n_taken++; end
      else begin pcm = (pcm + 1) % 256; if (prog[n % 256][31:30] == 2'b01) n_not++; end
      chk(int'(pc) == pcm, $sformatf("pc %0d exp %0d", pc, pcm));
      phase = PH4; @(negedge clk);
      phase = PH5; @(negedge clk);
    end
    chk(n_taken > 100 && n_not > 10, "taken and not-taken branches seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
