// tb_adiabatic_controller: checks the four-phase sequence of the adiabatic
// controller: CHARGE after reset, one step per clock, one-hot phase enables,
// capture high exactly one cycle in four (in EVALUATE), and an asynchronous
// reset taken in the middle of a cycle.
module tb_adiabatic_controller;
  import rev_pkg::*;
  logic       clk = 0, rst;
  phase_e     phase;
  logic [3:0] phase_en;
  logic       capture;
  int checks = 0, failures = 0;
  int captures = 0;

  adiabatic_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: phase=%0d en=%b capture=%0b", what, $time, phase, phase_en, capture);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1;
    #12;
    check(phase == PH_CHARGE, "reset phase");
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 40; cyc++) begin
      @(posedge clk);
      #1;
      check(int'(phase) == (cyc + 1) % 4, "phase step");
      check(phase_en == 4'(1 << ((cyc + 1) % 4)), "one-hot enable");
      check(capture == ((cyc + 1) % 4 == 1), "capture in EVALUATE");
      if (capture) captures++;
    end
    check(captures == 10, "one capture per four cycles");
    // asynchronous reset between clock edges
    @(negedge clk);
    #2 rst = 1;
    #1 check(phase == PH_CHARGE, "asynchronous reset");
    @(negedge clk) rst = 0;
    @(posedge clk) #1 check(phase == PH_EVALUATE && capture, "first phase after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
