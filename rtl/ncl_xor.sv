// ncl_xor: observable dual-rail NCL XOR, z = x XOR y.
//
// Two internal TH22 gates detect X^0Y^0 and X^0Y^1. Each feeds, with weight 2,
// a threshold-2 output gate (TH23w2) whose other two inputs are X^1Y^1 (for
// Z^0) or X^1Y^0 (for Z^1). Because the weight of the internal gate equals the
// output threshold, asserting an internal gate always asserts its output rail,
// so every gate that switches is observed at an output.
// Gate count, thresholds and the weight-2 rule follow the observable XOR
// structure; which operand pairs the internal gates decode is this design's
// reading of it. Zero-delay combinational cell with hysteresis.
module ncl_xor
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t z
);

  logic t00, t01;

  ncl_th #(.N(2), .M(2)) u_t00 (.rst(1'b0), .a({y.r0, x.r0}), .z(t00));
  ncl_th #(.N(2), .M(2)) u_t01 (.rst(1'b0), .a({y.r1, x.r0}), .z(t01));

  // a[0] carries weight 2
  ncl_th #(.N(3), .M(2), .WT({4'd1, 4'd1, 4'd2})) u_z0 (
    .rst(1'b0), .a({y.r1, x.r1, t00}), .z(z.r0));
  ncl_th #(.N(3), .M(2), .WT({4'd1, 4'd1, 4'd2})) u_z1 (
    .rst(1'b0), .a({y.r0, x.r1, t01}), .z(z.r1));

endmodule
