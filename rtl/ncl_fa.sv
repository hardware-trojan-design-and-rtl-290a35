// ncl_fa: dual-rail NCL full adder.
//
// Carry rails are majority gates: Cout^0 = TH23(Ci^0, X^0, Y^0) and
// Cout^1 = TH23(Ci^1, X^1, Y^1). Sum rails are threshold-3 gates that take the
// opposite carry rail with weight 2: S^0 = TH34w2(Cout^1, Ci^0, X^0, Y^0) and
// S^1 = TH34w2(Cout^0, Ci^1, X^1, Y^1). For legal inputs this gives
// S = X xor Y xor Ci; any illegal operand makes S illegal.
// The two threshold-2 and two threshold-3 gates follow the NCL full adder;
// the weight-2 carry input of the sum gates is the standard construction that
// makes those thresholds compute the sum.
// Zero-delay combinational cell with hysteresis.
module ncl_fa
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  input  dr_t ci,
  output dr_t s,
  output dr_t cout
);

  ncl_th #(.N(3), .M(2)) u_c0 (.rst(1'b0), .a({y.r0, x.r0, ci.r0}), .z(cout.r0));
  ncl_th #(.N(3), .M(2)) u_c1 (.rst(1'b0), .a({y.r1, x.r1, ci.r1}), .z(cout.r1));

  // a[0] (the opposite carry rail) carries weight 2
  ncl_th #(.N(4), .M(3), .WT({4'd1, 4'd1, 4'd1, 4'd2})) u_s0 (
    .rst(1'b0), .a({y.r0, x.r0, ci.r0, cout.r1}), .z(s.r0));
  ncl_th #(.N(4), .M(3), .WT({4'd1, 4'd1, 4'd1, 4'd2})) u_s1 (
    .rst(1'b0), .a({y.r1, x.r1, ci.r1, cout.r0}), .z(s.r1));

endmodule
