// ncl_modexp: dual-rail combinational logic computing m = c^d mod n.
//
// The word-level behaviour of an NCL combinational block: when every bit of
// c, d and n has arrived (at least one rail high), m becomes the DATA encoding
// of c^d mod n; it returns to NULL only when every input rail is low, and holds
// in between. The Boolean value of an input bit is its rail 1, so an ILLEGAL
// bit counts as 1. The result uses right-to-left square-and-multiply over
// the N exponent bits (n = 0 gives 0).
// The function follows the decryption block of the RSA node; its insides (a
// Boolean modular exponentiation wrapped in word-level completion and
// hysteresis rather than a threshold-gate netlist) are this design's.
// Timing: zero-delay; one latch per output rail.
module ncl_modexp
  import ncl_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  dr_t [N-1:0] c,
  input  dr_t [N-1:0] d,
  input  dr_t [N-1:0] n,
  output dr_t [N-1:0] m
);

  function automatic logic [N-1:0] modexp(input logic [N-1:0] base,
                                          input logic [N-1:0] ex,
                                          input logic [N-1:0] md);
    logic [2*N-1:0] r, x, mm;
    mm = (2*N)'(md);
    if (md == '0) return '0;
    r = (2*N)'(1) % mm;
    x = (2*N)'(base) % mm;
    for (int unsigned i = 0; i < N; i++) begin
      if (ex[i]) r = (r * x) % mm;
      x = (x * x) % mm;
    end
    return r[N-1:0];
  endfunction

  logic [N-1:0] cv, dv, nv, res;
  logic         all_data, all_null;

  always_comb begin
    all_data = 1'b1;
    all_null = 1'b1;
    for (int unsigned i = 0; i < N; i++) begin
      cv[i] = c[i].r1;
      dv[i] = d[i].r1;
      nv[i] = n[i].r1;
      all_data &= (c[i].r0 | c[i].r1) & (d[i].r0 | d[i].r1) & (n[i].r0 | n[i].r1);
      all_null &= ~(c[i].r0 | c[i].r1 | d[i].r0 | d[i].r1 | n[i].r0 | n[i].r1);
    end
  end

  assign res = modexp(cv, dv, nv);

  for (genvar i = 0; i < N; i++) begin : g_out
    always_latch begin
      if (all_data)
        m[i] = dr_enc(res[i]);
      else if (all_null)
        m[i] = DR_NULL;
    end
  end

endmodule
