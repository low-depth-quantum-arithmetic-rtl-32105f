// hybrid_rev_gate_adiabatic: the four-line reversible gate unit of the
// hybrid design. A two-bit mode selects which reversible gate is applied to
// the four data lines d[0..3]:
//   MODE_HNG     : HNG gate, A=d[0] B=d[1] C=d[2] D=d[3]
//                  -> {S, R, Q, P}; with d[3]=0 this is a full adder whose
//                  sum is on line 2 and carry on line 3
//   MODE_PERES   : Peres gate on d[0..2] (X=d[0] Y=d[1] Z=d[2]), d[3] passes;
//                  with d[2]=0 line 1 is the half-adder sum, line 2 the carry
//   MODE_FREDKIN : Fredkin gate, d[0] controls the swap of d[1] and d[2];
//                  d[3] passes
//   MODE_BYPASS  : identity
// Every mode is a bijection on the four lines, so the unit stays reversible.
//
// The module name, its 4-bit data input, 2-bit mode input and 4-bit output,
// and the choice of HNG, Peres and Fredkin gates follow the design; the mode
// codes, the assignment of gate pins to lines and the bypass mode are this
// implementation's own. All three gates are computed in parallel and the
// mode drives an output multiplexer. Purely combinational.
module hybrid_rev_gate_adiabatic
  import rev_pkg::*;
(
  input  logic [GATE_LINES-1:0] data_in,
  input  mode_e                 mode,
  output logic [GATE_LINES-1:0] data_out
);

  logic hng_p, hng_q, hng_r, hng_s;
  logic per_g, per_p, per_c;
  logic fre_c, fre_o1, fre_o2;

  hng_gate u_hng (
    .a(data_in[0]), .b(data_in[1]), .c(data_in[2]), .d(data_in[3]),
    .p(hng_p), .q(hng_q), .r(hng_r), .s(hng_s)
  );

  peres_gate u_peres (
    .x(data_in[0]), .y(data_in[1]), .z(data_in[2]),
    .g(per_g), .p(per_p), .c(per_c)
  );

  fredkin_gate u_fredkin (
    .ctl(data_in[0]), .i1(data_in[1]), .i2(data_in[2]),
    .ctl_o(fre_c), .o1(fre_o1), .o2(fre_o2)
  );

  always_comb begin
    unique case (mode)
      MODE_HNG:     data_out = {hng_s, hng_r, hng_q, hng_p};
      MODE_PERES:   data_out = {data_in[3], per_c, per_p, per_g};
      MODE_FREDKIN: data_out = {data_in[3], fre_o2, fre_o1, fre_c};
      default:      data_out = data_in;
    endcase
  end

endmodule
