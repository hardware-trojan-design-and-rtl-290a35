// ncl_thand0: NCL THand0 gate, set function AB + BC + AD, with hysteresis
// (deasserts only when A, B, C and D are all 0). Used for the DATA0 rail of the
// input-complete NCL AND: with A=X^0, B=Y^0, C=X^1, D=Y^1 it asserts for
// X^0Y^0 + Y^0X^1 + X^0Y^1. Zero-delay.
module ncl_thand0 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic z
);

  logic set, clr;

  assign set = (a & b) | (b & c) | (a & d);
  assign clr = ~(a | b | c | d);

  always_latch begin
    if (set || clr)
      z = set;
  end

endmodule
