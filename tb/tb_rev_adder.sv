// tb_rev_adder: exhaustive check of the HNG ripple adder at WIDTH=4
// (all 512 combinations of A, B and CIN) against integer addition, then
// 2000 random additions on a 32-bit instance, including the all-ones
// operands that make the carry ripple through every bit.
module tb_rev_adder;
  localparam int unsigned W = 4;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  rev_adder #(.WIDTH(W)) dut (.*);

  localparam int unsigned WW = 32;
  logic [WW-1:0] wa, wb, wsum;
  logic          wcin, wcout;
  rev_adder #(.WIDTH(WW)) dut_wide (.a(wa), .b(wb), .cin(wcin), .sum(wsum), .cout(wcout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < (1 << W); va++)
      for (int vb = 0; vb < (1 << W); vb++)
        for (int vc = 0; vc < 2; vc++) begin
          int expect_total;
          a = W'(va); b = W'(vb); cin = 1'(vc);
          #1;
          expect_total = va + vb + vc;
          checks++;
          if ({cout, sum} != (W + 1)'(expect_total)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d: got cout=%0b sum=%0d", va, vb, vc, cout, sum);
          end
        end
    for (int n = 0; n < 2000; n++) begin
      logic [WW:0] expect_wide;
      wa = (n == 0) ? '1 : WW'($urandom);
      wb = (n == 0) ? '0 : WW'($urandom);
      wcin = (n == 0) ? 1'b1 : 1'($urandom);
      #1;
      expect_wide = {1'b0, wa} + {1'b0, wb} + {{WW{1'b0}}, wcin};
      checks++;
      if ({wcout, wsum} != expect_wide) begin
        failures++;
        $display("FAIL wide %h + %h + %0b: got %0b_%h", wa, wb, wcin, wcout, wsum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
