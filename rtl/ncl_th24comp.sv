// ncl_th24comp: NCL TH24comp gate, set function AC + BC + AD + BD, i.e.
// (A+B)(C+D), with hysteresis (deasserts only when all four inputs are 0).
// The half adder uses one per sum rail; for legal inputs the cross terms
// (X^0X^1, Y^0Y^1) are zero. Zero-delay.
module ncl_th24comp (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic z
);

  logic set, clr;

  assign set = (a & c) | (b & c) | (a & d) | (b & d);
  assign clr = ~(a | b | c | d);

  always_latch begin
    if (set || clr)
      z = set;
  end

endmodule
