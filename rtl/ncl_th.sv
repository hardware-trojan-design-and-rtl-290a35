// ncl_th: generic NCL threshold gate THmn with optional input weights and
// hysteresis.
//
// The output asserts when the weighted sum of the asserted inputs reaches the
// threshold M, and once asserted it deasserts only when every input has
// deasserted. In between it holds its value, so the gate is a level-sensitive
// state element: the hold is written as a latch enabled whenever the gate is
// either set (sum >= M) or cleared (all inputs 0).
//
// Parameters: N inputs, threshold M, WT[i] = weight of input a[i] (1 by
// default; a weighted input counts WT[i] times), RST_VAL = value forced while
// rst is high. The THmnWw notation, the threshold rule and the hysteresis
// follow the NCL gate definition; the reset input is the usual way NCL
// register gates are initialised (TH22n/TH22d) and is tied low in
// combinational cells.
//
// Timing: zero-delay; the output follows the inputs in the same time step.
module ncl_th #(
  parameter int unsigned           N       = 2,
  parameter int unsigned           M       = 2,
  parameter bit [N-1:0][3:0]       WT      = {N{4'd1}},
  parameter bit                    RST_VAL = 1'b0
) (
  input  logic         rst,
  input  logic [N-1:0] a,
  output logic         z
);

  logic [7:0] sum;
  logic       set, clr;

  always_comb begin
    sum = '0;
    for (int unsigned i = 0; i < N; i++)
      if (a[i]) sum = sum + 8'(WT[i]);
  end

  assign set = (sum >= 8'(M));
  assign clr = ~|a;

  always_latch begin
    if (rst)
      z = RST_VAL;
    else if (set || clr)
      z = set;
  end

endmodule
