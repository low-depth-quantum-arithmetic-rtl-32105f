// tb_hybrid: end-to-end test of the hybrid top level at its default
// parameters (WIDTH = 4).
//
// Random data_in, mode, A, B and Cin are applied right after each register
// load. The expected outputs are computed in this testbench from integer
// arithmetic (full adder, half adder, controlled swap, identity, addition,
// comparison). The test checks that:
//   - outputs are cleared by reset and stay cleared until the first load;
//   - after the inputs change, outputs keep their old value for three edges
//     (hold phases) and show the new result on the fourth (load latency);
//   - data_out, parity, SUM, Cout, X, Y, Sel and Eq are then correct;
//   - enable_bus is one-hot;
//   - an asynchronous reset in mid-run clears every output.
// It counts how often each mechanism happened (each of the four modes, a
// carry out, a swap, equal operands, an odd parity, a held output, a reset)
// and counts a failure for any that never happened.
module tb_hybrid;
  import rev_pkg::*;
  localparam int unsigned W = 4;
  localparam int unsigned N_OPS = 400;

  logic         clk = 0, rst;
  logic [3:0]   data_in, data_out, enable_bus;
  logic [1:0]   mode;
  logic         parity;
  logic [W-1:0] A, B, SUM, X, Y;
  logic         Cin, Cout, Sel, Eq;

  int checks = 0, failures = 0;
  int n_mode[4] = '{default: 0};
  int n_carry = 0, n_swap = 0, n_equal = 0, n_odd = 0, n_hold = 0, n_reset = 0;

  hybrid dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: mode=%0d in=%h out=%h par=%0b A=%0d B=%0d Cin=%0b SUM=%0d Cout=%0b X=%0d Y=%0d Sel=%0b Eq=%0b",
               what, $time, mode, data_in, data_out, parity, A, B, Cin, SUM, Cout, X, Y, Sel, Eq);
    end
  endtask

  function automatic logic [3:0] gate_model(input int m, input logic [3:0] v);
    int t;
    case (m)
      0: begin
        t = int'(v[0]) + int'(v[1]) + int'(v[2]);
        return {t[1] ^ v[3], t[0], v[1], v[0]};
      end
      1: begin
        t = int'(v[0]) + int'(v[1]);
        return {v[3], t[1] ^ v[2], t[0], v[0]};
      end
      2: return v[0] ? {v[3], v[1], v[2], v[0]} : v;
      default: return v;
    endcase
  endfunction

  task automatic check_all_clear(input string what);
    check(data_out == 0 && parity == 0 && SUM == 0 && Cout == 0 && X == 0 && Y == 0 &&
          Sel == 0 && Eq == 0, what);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0]   exp_out, prev_out;
    int           exp_total, va, vb;
    logic [W-1:0] prev_sum;

    rst = 1; data_in = '0; mode = '0; A = '0; B = '0; Cin = 0;
    #13;
    check_all_clear("reset clears outputs");
    n_reset++;
    @(negedge clk) rst = 0;
    // first load comes on the second edge after reset (CHARGE -> EVALUATE -> load)
    @(posedge clk) #1 check_all_clear("no load in CHARGE");
    @(posedge clk) #1;  // load of the all-zero inputs

    for (int op = 0; op < N_OPS; op++) begin
      // new inputs just after a load
      data_in = 4'($urandom);
      mode    = (op < 8) ? 2'(op % 4) : 2'($urandom);
      va      = int'($urandom_range(0, (1 << W) - 1));
      vb      = (op % 7 == 3) ? va : int'($urandom_range(0, (1 << W) - 1));
      A = W'(va); B = W'(vb); Cin = 1'($urandom);
      prev_out = data_out;
      prev_sum = SUM;

      // three edges of HOLD, RECOVER, CHARGE: outputs must not move
      for (int e = 0; e < 3; e++) begin
        @(posedge clk) #1;
        check($onehot(enable_bus), "enable_bus one-hot");
        check(data_out == prev_out && SUM == prev_sum, "output held between loads");
      end
      if (data_out != gate_model(int'(mode), data_in) || SUM != W'(va + vb + int'(Cin)))
        n_hold++;

      // fourth edge ends EVALUATE: new results
      @(posedge clk) #1;
      exp_out   = gate_model(int'(mode), data_in);
      exp_total = va + vb + int'(Cin);
      check(data_out == exp_out, "gate unit result");
      check(parity == ^exp_out, "parity");
      check({Cout, SUM} == (W + 1)'(exp_total), "sum");
      check(Sel == (va > vb) && Eq == (va == vb), "compare");
      check(int'(X) == ((va < vb) ? va : vb) && int'(Y) == ((va < vb) ? vb : va), "conditional swap");

      n_mode[mode]++;
      if (Cout)   n_carry++;
      if (Sel)    n_swap++;
      if (Eq)     n_equal++;
      if (parity) n_odd++;

      // asynchronous reset in the middle of the run
      if (op == N_OPS / 2) begin
        @(negedge clk) #2 rst = 1;
        #1 check_all_clear("asynchronous reset clears outputs");
        n_reset++;
        @(negedge clk) rst = 0;
        @(posedge clk) #1 check_all_clear("no load in CHARGE after reset");
        @(posedge clk) #1;
      end
    end

    for (int m = 0; m < 4; m++) begin
      $display("mode %0d used %0d times", m, n_mode[m]);
      check(n_mode[m] > 0, "every mode exercised");
    end
    $display("carry-out %0d, swap %0d, equal %0d, odd parity %0d, held outputs %0d, resets %0d",
             n_carry, n_swap, n_equal, n_odd, n_hold, n_reset);
    check(n_carry > 0, "carry out exercised");
    check(n_swap > 0, "swap exercised");
    check(n_equal > 0, "equal operands exercised");
    check(n_odd > 0, "odd parity exercised");
    check(n_hold > 0, "output hold exercised");
    check(n_reset > 1, "mid-run reset exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
