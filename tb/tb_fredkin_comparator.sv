// tb_fredkin_comparator: exhaustive check at WIDTH=4 of the comparator
// against integer comparison: SEL = (A > B), EQ = (A == B), X = min, Y = max,
// then 2000 random comparisons on a 32-bit instance, a third of them with
// operands that differ only in their lowest bit or are equal.
module tb_fredkin_comparator;
  localparam int unsigned W = 4;
  logic [W-1:0] a, b, x, y;
  logic sel, eq;
  int checks = 0, failures = 0;

  fredkin_comparator #(.WIDTH(W)) dut (.*);

  localparam int unsigned WW = 32;
  logic [WW-1:0] wa, wb, wx, wy;
  logic          wsel, weq;
  fredkin_comparator #(.WIDTH(WW)) dut_wide (.a(wa), .b(wb), .x(wx), .y(wy), .sel(wsel), .eq(weq));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < (1 << W); va++)
      for (int vb = 0; vb < (1 << W); vb++) begin
        int lo, hi;
        a = W'(va); b = W'(vb);
        #1;
        lo = (va < vb) ? va : vb;
        hi = (va < vb) ? vb : va;
        checks++;
        if (sel != (va > vb) || eq != (va == vb) || int'(x) != lo || int'(y) != hi) begin
          failures++;
          $display("FAIL a=%0d b=%0d: sel=%0b eq=%0b x=%0d y=%0d", va, vb, sel, eq, x, y);
        end
      end
    for (int n = 0; n < 2000; n++) begin
      wa = WW'($urandom);
      case (n % 3)
        0: wb = wa;
        1: wb = wa ^ WW'(1);
        default: wb = WW'($urandom);
      endcase
      #1;
      checks++;
      if (wsel != (wa > wb) || weq != (wa == wb) ||
          wx != ((wa < wb) ? wa : wb) || wy != ((wa < wb) ? wb : wa)) begin
        failures++;
        $display("FAIL wide a=%h b=%h: sel=%0b eq=%0b x=%h y=%h", wa, wb, wsel, weq, wx, wy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
