// ncl_keyreg: key register with dual-rail read ports (n, e and d registers).
//
// Holds a VW-bit Boolean value that is written rarely (level-sensitive load,
// cleared by rst) and read through PORTS read ports. Read port p outputs the
// stored value as a W-bit dual-rail word while its request ki[p] is 1 and
// NULL while it is 0, so each reader runs its own 4-phase handshake on the
// same stored value. Bits VW..W-1 are padding and read as DATA0, so short
// keys (e, d) appear as words of the modulus width.
// Read ports and MSB DATA0 padding follow the key registers of the RSA node;
// the load interface, reset and the Boolean AND read gates (a stored rail that
// stays high would keep a hysteresis gate set forever) are this design's
// choices. While rst is high all read ports give NULL.
// Timing: zero-delay; the port output follows ki in the same step.
module ncl_keyreg
  import ncl_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned VW    = 8,
  parameter int unsigned PORTS = 2
) (
  input  logic                    rst,
  input  logic                    load,
  input  logic [VW-1:0]           val,
  input  logic [PORTS-1:0]        ki,
  output dr_t  [PORTS-1:0][W-1:0] q
);

  logic [VW-1:0] v;
  logic [W-1:0]  vw;

  always_latch begin
    if (rst)
      v = '0;
    else if (load)
      v = val;
  end

  assign vw = W'(v);

  for (genvar p = 0; p < PORTS; p++) begin : g_port
    logic rd;
    assign rd = ki[p] & ~rst;
    for (genvar i = 0; i < W; i++) begin : g_bit
      assign q[p][i].r1 = rd &  vw[i];
      assign q[p][i].r0 = rd & ~vw[i];
    end
  end

endmodule
