// ncl_mux_ic: input-complete dual-rail 2:1 word multiplexer, f = s ? b : a.
//
// For every bit, each operand's arrival is detected by a TH12 on its rails
// (ca, cb). Four TH44 gates then form the products
//   S^0 . A^r . ca . cb   and   S^1 . B^r . ca . cb   for r = 0, 1,
// and a TH12 per rail merges the two products. An output bit therefore becomes
// DATA only when s and both bits a[i] and b[i] are DATA, and returns to NULL
// only when all of them are NULL: the output word is input-complete with
// respect to a, b and s, and ca/cb take part in every product so no gate
// switches unobserved.
// The input-complete multiplexer is required by the RSA node; this gate
// structure is this design's own. Zero-delay with hysteresis.
module ncl_mux_ic
  import ncl_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  dr_t [W-1:0] a,
  input  dr_t [W-1:0] b,
  input  dr_t         s,
  output dr_t [W-1:0] f
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic ca, cb, pa0, pa1, pb0, pb1;
    ncl_th #(.N(2), .M(1)) u_ca (.rst(1'b0), .a({a[i].r1, a[i].r0}), .z(ca));
    ncl_th #(.N(2), .M(1)) u_cb (.rst(1'b0), .a({b[i].r1, b[i].r0}), .z(cb));
    ncl_th #(.N(4), .M(4)) u_pa0 (.rst(1'b0), .a({cb, ca, a[i].r0, s.r0}), .z(pa0));
    ncl_th #(.N(4), .M(4)) u_pa1 (.rst(1'b0), .a({cb, ca, a[i].r1, s.r0}), .z(pa1));
    ncl_th #(.N(4), .M(4)) u_pb0 (.rst(1'b0), .a({cb, ca, b[i].r0, s.r1}), .z(pb0));
    ncl_th #(.N(4), .M(4)) u_pb1 (.rst(1'b0), .a({cb, ca, b[i].r1, s.r1}), .z(pb1));
    ncl_th #(.N(2), .M(1)) u_f0 (.rst(1'b0), .a({pb0, pa0}), .z(f[i].r0));
    ncl_th #(.N(2), .M(1)) u_f1 (.rst(1'b0), .a({pb1, pa1}), .z(f[i].r1));
  end

endmodule
