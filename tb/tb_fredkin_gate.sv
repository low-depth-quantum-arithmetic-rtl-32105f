// tb_fredkin_gate: exhaustive check of the Fredkin gate.
// For all 8 inputs: the control passes, data passes straight when the
// control is 0 and is exchanged when it is 1, the number of ones is kept,
// and applying the gate twice restores the input (self-inverse).
module tb_fredkin_gate;
  logic ctl, i1, i2, ctl_o, o1, o2;
  logic ctl_o2, o1b, o2b;
  int checks = 0, failures = 0;

  fredkin_gate dut  (.*);
  fredkin_gate dut2 (.ctl(ctl_o), .i1(o1), .i2(o2), .ctl_o(ctl_o2), .o1(o1b), .o2(o2b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: ctl=%0b i1=%0b i2=%0b -> %0b %0b %0b", what, ctl, i1, i2, ctl_o, o1, o2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {i2, i1, ctl} = 3'(v);
      #1;
      check(ctl_o == ctl, "control passes");
      if (ctl) check(o1 == i2 && o2 == i1, "swap");
      else     check(o1 == i1 && o2 == i2, "straight");
      check(int'(ctl_o) + int'(o1) + int'(o2) == int'(ctl) + int'(i1) + int'(i2), "ones kept");
      check(ctl_o2 == ctl && o1b == i1 && o2b == i2, "self-inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
