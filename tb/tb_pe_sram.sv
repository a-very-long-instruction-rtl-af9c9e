// tb_pe_sram: checks write, one-tick read latency, read hold and enable of
// the PE memory model against a reference array.
// Runs at the full 256K x 16 size, which is the document's; the one-tick
// synchronous model of the memory timing is this design's.
module tb_pe_sram;
  localparam int AW = 18;
  logic clk = 1'b0;
  logic en, we;
  logic [AW-1:0] addr;
  logic [15:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [15:0] ref_mem [int];

  pe_sram #(.AW(AW), .DW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] a;
    en = 0; we = 0; addr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      a = (i < 100) ? AW'(i) : AW'($urandom);
      en = 1; we = 1; addr = a; wdata = 16'($urandom);
      ref_mem[int'(a)] = wdata;
      @(negedge clk);
    end
    foreach (ref_mem[k]) begin
      en = 1; we = 0; addr = AW'(k);
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[k]) begin
        failures++;
        $display("read %h got %h exp %h", k, rdata, ref_mem[k]);
      end
      // With en low the output holds.
      en = 0; addr = addr + 1;
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[k]) failures++;
    end
    // A write does not disturb the read register.
    en = 1; we = 1; addr = 0; wdata = 16'h1234;
    @(negedge clk);
    en = 1; we = 0; addr = 0;
    @(negedge clk);
    checks++;
    if (rdata !== 16'h1234) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
