// rev_adder: WIDTH-bit adder made of one HNG gate per bit.
//
// SUM + 2^WIDTH * COUT = A + B + CIN.
// Bit i feeds A_i, B_i and the incoming carry to an HNG gate with its fourth
// input tied to 0; the gate's R output is the sum bit and its S output the
// carry into bit i+1. Each bit therefore costs one reversible gate level,
// against the three cascaded Toffoli levels of a Toffoli full adder, while
// the carry still ripples from bit to bit, as the design states ("maintaining
// logical ripple reliance for correctness"). The HNG pass-through outputs
// (copies of A_i and B_i) are garbage and are not used.
//
// The per-bit HNG full adder and the ripple of carries follow the design;
// the default WIDTH of 4 follows the 4-bit A, B and SUM of its simulation.
// Purely combinational.
module rev_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] sum_int;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    logic garbage_p, garbage_q;
    hng_gate u_hng (
      .a(a[i]), .b(b[i]), .c(carry[i]), .d(1'b0),
      .p(garbage_p), .q(garbage_q), .r(sum_int[i]), .s(carry[i+1])
    );
  end

  assign sum  = sum_int;
  assign cout = carry[WIDTH];

endmodule
