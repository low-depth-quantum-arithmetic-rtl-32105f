// tb_peres_gate: exhaustive check of the Peres gate.
// For all 8 inputs: G copies X, P is the low bit of X+Y, C equals the carry
// of X+Y (the high bit) XOR Z, and all 8 outputs differ (reversible).
module tb_peres_gate;
  logic x, y, z, g, p, c;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  peres_gate dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%0b y=%0b z=%0b -> g=%0b p=%0b c=%0b", what, x, y, z, g, p, c);
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
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      int total;
      {z, y, x} = 3'(v);
      #1;
      total = int'(x) + int'(y);
      check(g == x, "pass-through");
      check(p == total[0], "half-adder sum");
      check((c ^ z) == total[1], "half-adder carry");
      check(!seen[{c, p, g}], "output unique");
      seen[{c, p, g}] = 1'b1;
    end
    check(&seen, "bijection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
