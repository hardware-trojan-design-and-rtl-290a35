// ncl_ha: input-complete, observable dual-rail NCL half adder.
//
// Sum rails: S^0 = X^0Y^0 + X^1Y^1 and S^1 = X^0Y^1 + X^1Y^0, each from one
// TH24comp gate, (A+B)(C+D), whose cross terms X^0X^1 and Y^0Y^1 vanish for
// legal inputs. Carry rails: Cout^0 = TH12(X^0, Y^0), Cout^1 = TH22(X^1, Y^1).
// With an illegal operand (both rails high) both sum gates assert, so S is
// illegal, while Cout may still be legal: this is how an illegal value
// propagates through arithmetic.
// The gate types and equations follow the NCL half adder; the assignment of
// rails to the A..D pins is this design's.
// Zero-delay combinational cell with hysteresis.
module ncl_ha
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t s,
  output dr_t cout
);

  ncl_th24comp u_s0 (.a(x.r0), .b(y.r1), .c(y.r0), .d(x.r1), .z(s.r0));
  ncl_th24comp u_s1 (.a(x.r0), .b(y.r0), .c(y.r1), .d(x.r1), .z(s.r1));

  ncl_th #(.N(2), .M(1)) u_c0 (.rst(1'b0), .a({y.r0, x.r0}), .z(cout.r0));
  ncl_th #(.N(2), .M(2)) u_c1 (.rst(1'b0), .a({y.r1, x.r1}), .z(cout.r1));

endmodule
