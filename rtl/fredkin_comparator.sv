// fredkin_comparator: WIDTH-bit magnitude comparator with conditional swap,
// built only from Fredkin (controlled swap) gates and inverters.
//
// Outputs: SEL = (A > B), EQ = (A == B), X = min(A, B), Y = max(A, B).
//
// How it works, per bit i:
//   gt_i = A_i & ~B_i        Fredkin(ctl=B_i, I1=A_i, I2=0), output O1
//   eq_i = ~(A_i ^ B_i)      Fredkin(ctl=A_i, I1=~B_i, I2=B_i), output O1
// A chain from the least to the most significant bit keeps the running
// result; a Fredkin gate used as a 2:1 multiplexer routes it:
//   gt_upto_i = eq_i ? gt_upto_{i-1} : gt_i
//   eq_upto_i = eq_i ? eq_upto_{i-1} : 0
// so the most significant differing bit decides. SEL = gt_upto_{WIDTH-1}
// then drives one Fredkin gate per bit that exchanges A_i and B_i, which
// gives X (the smaller operand) and Y (the larger) in one gate level.
//
// The use of the Fredkin gate for comparison by conditional swap, and the
// output names X, Y and Sel, follow the design; the bit-level structure
// (the compare terms and the multiplexer chain) and the EQ output are this
// implementation's choice, since the design gives only the block's purpose.
// Purely combinational.
module fredkin_comparator #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y,
  output logic             sel,
  output logic             eq
);

  logic [WIDTH-1:0] gt_bit, eq_bit;
  logic [WIDTH:0]   gt_chain, eq_chain;

  assign gt_chain[0] = 1'b0;
  assign eq_chain[0] = 1'b1;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic unused_c0, unused_c1, unused_c2, unused_c3, unused_c4;
    logic unused_o0, unused_o1, unused_o2, unused_o3;

    // gt_i = A_i & ~B_i
    fredkin_gate u_gt (
      .ctl(b[i]), .i1(a[i]), .i2(1'b0),
      .ctl_o(unused_c0), .o1(gt_bit[i]), .o2(unused_o0)
    );
    // eq_i = A_i XNOR B_i
    fredkin_gate u_eq (
      .ctl(a[i]), .i1(~b[i]), .i2(b[i]),
      .ctl_o(unused_c1), .o1(eq_bit[i]), .o2(unused_o1)
    );
    // running greater-than: keep lower result while bits are equal
    fredkin_gate u_gt_mux (
      .ctl(eq_bit[i]), .i1(gt_bit[i]), .i2(gt_chain[i]),
      .ctl_o(unused_c2), .o1(gt_chain[i+1]), .o2(unused_o2)
    );
    // running equality: AND of all bit equalities
    fredkin_gate u_eq_and (
      .ctl(eq_bit[i]), .i1(1'b0), .i2(eq_chain[i]),
      .ctl_o(unused_c3), .o1(eq_chain[i+1]), .o2(unused_o3)
    );
    // conditional swap: X = min, Y = max
    fredkin_gate u_swap (
      .ctl(sel), .i1(a[i]), .i2(b[i]),
      .ctl_o(unused_c4), .o1(x[i]), .o2(y[i])
    );
  end

  assign sel = gt_chain[WIDTH];
  assign eq  = eq_chain[WIDTH];

endmodule
