// tb_phase_ctrl: checks the 0..5 phase sequence, crossbar configuration,
// cycle_end in phase 5, the cycle counter and the hold while halted.
// Checks the document's six phases per instruction cycle; the hold at
// phase 0 while halted is this design's choice.
module tb_phase_ctrl;
  import dex2_pkg::*;
  logic clk = 1'b0, rst, run;
  phase_t phase;
  logic [2:0] xbar_cfg;
  logic cycle_end;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  phase_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    int exp_ph, exp_cyc;
    rst = 1; run = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    chk(phase == PH0 && cycles == 0, "hold while halted");
    run = 1;
    exp_ph = 0; exp_cyc = 0;
    for (int t = 0; t < 100; t++) begin
      chk(int'(phase) == exp_ph, $sformatf("phase t=%0d", t));
      chk(xbar_cfg == 3'(exp_ph), "xbar cfg");
      chk(cycle_end == (exp_ph == 5), "cycle_end");
      chk(int'(cycles) == exp_cyc, "cycles");
      @(negedge clk);
      if (exp_ph == 5) begin exp_ph = 0; exp_cyc++; end else exp_ph++;
    end
    run = 0;
    @(negedge clk);
    chk(phase == PH0 && !cycle_end, "halt returns to phase 0");
    chk(int'(cycles) == exp_cyc, "cycles held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
