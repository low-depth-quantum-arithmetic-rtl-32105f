// tb_hybrid_rev_gate_adiabatic: exhaustive check of the four-line gate unit.
// For every mode and all 16 inputs the output is compared with an
// arithmetic description of the selected gate (full adder, half adder,
// controlled swap, identity), and each mode is checked to be a bijection.
module tb_hybrid_rev_gate_adiabatic;
  import rev_pkg::*;
  logic [3:0] data_in, data_out;
  mode_e      mode;
  int checks = 0, failures = 0;

  hybrid_rev_gate_adiabatic dut (.*);

  function automatic logic [3:0] model(input int m, input logic [3:0] v);
    int t;
    logic [3:0] o;
    case (m)
      0: begin  // HNG: lines 0,1 pass; line 2 = sum; line 3 = carry ^ line 3
        t = int'(v[0]) + int'(v[1]) + int'(v[2]);
        o = {t[1] ^ v[3], t[0], v[1], v[0]};
      end
      1: begin  // Peres: line 1 = half sum; line 2 = half carry ^ line 2
        t = int'(v[0]) + int'(v[1]);
        o = {v[3], t[1] ^ v[2], t[0], v[0]};
      end
      2: o = v[0] ? {v[3], v[1], v[2], v[0]} : v;  // Fredkin: swap lines 1,2
      default: o = v;
    endcase
    return o;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      logic [15:0] seen = '0;
      mode = mode_e'(m);
      for (int v = 0; v < 16; v++) begin
        data_in = 4'(v);
        #1;
        checks++;
        if (data_out != model(m, data_in)) begin
          failures++;
          $display("FAIL mode=%0d in=%h out=%h expected=%h", m, data_in, data_out, model(m, data_in));
        end
        seen[data_out] = 1'b1;
      end
      checks++;
      if (!(&seen)) begin
        failures++;
        $display("FAIL mode=%0d is not a bijection", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
