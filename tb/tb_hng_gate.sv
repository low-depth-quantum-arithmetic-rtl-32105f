// tb_hng_gate: exhaustive check of the HNG gate.
// For all 16 inputs it checks the pass-through outputs, that with D=0 the
// outputs R and S equal the low and high bits of the integer sum A+B+C (a
// full adder), that D toggles S, and that the 16 output patterns are all
// different (the gate is reversible).
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  logic [15:0] seen;

  hng_gate dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b d=%0b -> p=%0b q=%0b r=%0b s=%0b",
               what, a, b, c, d, p, q, r, s);
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
    for (int v = 0; v < 16; v++) begin
      int total;
      {d, c, b, a} = 4'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      check(p == a && q == b, "pass-through");
      check(r == total[0], "sum bit");
      check((s ^ d) == total[1], "carry bit");
      check(!seen[{s, r, q, p}], "output unique");
      seen[{s, r, q, p}] = 1'b1;
    end
    check(&seen, "bijection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
