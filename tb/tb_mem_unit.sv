// tb_mem_unit: drives LD, LDI, MV, ST and NOP words through the six-phase
// schedule against a reference memory; also feeds stores of a simulated
// other half on xch_in and checks they are mirrored in phase 3, and that
// this unit offers its own stores on xch_out.
// The bench plays the decode stage and the other half's memory manager and
// reads the data memory back through the host port. The phase timing checked
// follows the document; the operand conventions are this design's.
module tb_mem_unit;
  import dex2_pkg::*;
  import dex2_asm_pkg::*;
  logic clk = 1'b0, rst, run;
  phase_t phase;
  logic [15:0] opa_in, opb_in, result, host_rdata;
  logic [31:0] instr_in;
  host_req_t host;
  logic xch_st_out, xch_st_in, mirror_wr;
  logic [15:0] xch_addr_out, xch_data_out, xch_addr_in, xch_data_in;
  int checks = 0, failures = 0, mirrors = 0;
  logic [15:0] refm [256];

  mem_unit #(.AW(18)) dut (.*);
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

  always @(posedge clk) if (mirror_wr) mirrors++;

  initial begin
    rst = 1; run = 0; phase = PH0; opa_in = 0; opb_in = 0; instr_in = 0; host = '0;
    xch_st_in = 0; xch_addr_in = 0; xch_data_in = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 256; i++) begin
      refm[i] = 16'($urandom);
      host.en = 1; host.we = 1; host.addr = 18'(i); host.wdata = refm[i];
      @(negedge clk);
    end
    host = '0;
    run = 1;
    for (int i = 0; i < 3000; i++) begin
      automatic int k = $urandom_range(4);
      automatic logic [15:0] a = 16'($urandom), b = 16'($urandom_range(255));
      automatic logic [15:0] imm = 16'($urandom);
      automatic logic [15:0] pa = 16'($urandom_range(255)), pd = 16'($urandom);
      automatic logic        pst = ($urandom_range(2) == 0) && (pa != b);
      logic [31:0] w;
      logic [15:0] e;
      unique case (k)
        0: begin w = w_reg(OP_LD, 0, 1, 3, 0);  e = refm[b[7:0]]; end
        1: begin w = w_imm(OP_LDI, int'(imm), 3, 0); e = imm; end
        2: begin w = w_reg(OP_MV, 1, 0, 3, 0);  e = a; end
        3: begin w = w_reg(OP_ST, 1, 2, 0, 0);  e = 16'h0; end
        default: begin w = w_nop(); e = 16'h0; end
      endcase
      opa_in = a; opb_in = b; instr_in = w;
      xch_st_in = pst; xch_addr_in = pa; xch_data_in = pd;
      phase = PH5; @(negedge clk);
      phase = PH0; @(negedge clk);
      chk(xch_st_out == (k == 3), "own store offered");
      if (k == 3) begin
        chk(xch_addr_out == b && xch_data_out == a, "store exchange address/data");
        refm[b[7:0]] = a;
      end
      phase = PH1; @(negedge clk);
      chk(result == e, $sformatf("op %0d result %h exp %h", k, result, e));
      phase = PH2; @(negedge clk);
      phase = PH3; @(negedge clk);
      if (pst) refm[pa[7:0]] = pd;
      phase = PH4; @(negedge clk);
      xch_st_in = 0;
    end
    run = 0;
    for (int i = 0; i < 256; i++) begin
      host.en = 1; host.we = 0; host.addr = 18'(i);
      @(negedge clk);
      chk(host_rdata == refm[i], $sformatf("final mem[%0d] %h exp %h", i, host_rdata, refm[i]));
    end
    host = '0;
    chk(mirrors > 100, "mirrored stores happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
