// ncl_and: input-complete dual-rail NCL AND, z = x AND y.
//
// Z^0 comes from a THand0 gate (A=X^0, B=Y^0, C=X^1, D=Y^1), which asserts
// only when both operands are DATA and at least one is DATA0; Z^1 comes from a
// TH22 gate on X^1 and Y^1. So z becomes DATA only when both x and y are DATA
// (input-complete), and returns to NULL only when both are NULL.
// The two gates and their roles follow the NCL AND structure; the pin
// assignment of THand0 is chosen so the gate computes the DATA0 cases.
// Zero-delay combinational cell with hysteresis.
module ncl_and
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t z
);

  ncl_thand0 u_z0 (.a(x.r0), .b(y.r0), .c(x.r1), .d(y.r1), .z(z.r0));

  ncl_th #(.N(2), .M(2)) u_z1 (.rst(1'b0), .a({y.r1, x.r1}), .z(z.r1));

endmodule
