// tb_mul_unit: loads the 8x8 product table through the host port (as the
// host does before a program runs), then checks random multiplies, with
// operand bits above bit 7 ignored, and the phase-1 result timing.
// Table entry a*256+b = a*b is this design's layout; the document says only
// that the two operands form the address of an externally generated table.
module tb_mul_unit;
  import dex2_pkg::*;
  logic clk = 1'b0, rst, run;
  phase_t phase;
  logic [15:0] opa_in, opb_in, result, host_rdata;
  host_req_t host;
  int checks = 0, failures = 0;

  mul_unit dut (.*);
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

  initial begin
    rst = 1; run = 0; phase = PH0; opa_in = 0; opb_in = 0; host = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        host.en = 1; host.we = 1; host.addr = 18'(a * 256 + b); host.wdata = 16'(a * b);
        @(negedge clk);
      end
    host = '0;
    // Host read-back of one table entry.
    host.en = 1; host.we = 0; host.addr = 18'(200 * 256 + 3);
    @(negedge clk);
    host = '0;
    chk(host_rdata == 16'd600, "host read of table");
    run = 1;
    for (int i = 0; i < 3000; i++) begin
      automatic logic [15:0] a = 16'($urandom), b = 16'($urandom);
      automatic logic [15:0] e = 16'(a[7:0]) * 16'(b[7:0]);
      opa_in = a; opb_in = b;
      phase = PH5; @(negedge clk);
      phase = PH0; @(negedge clk);
      phase = PH1; @(negedge clk);
      chk(result == e, $sformatf("%h*%h -> %h exp %h", a, b, result, e));
      phase = PH2; @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
