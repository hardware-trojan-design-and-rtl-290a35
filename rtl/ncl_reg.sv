// ncl_reg: NCL register stage for a word of W dual-rail bits.
//
// Each rail is a resettable TH22 gate on the incoming rail and ki, so a bit
// passes DATA when the next stage requests data (ki=1) and passes NULL when it
// requests null (ki=0); in between the hysteresis holds the last wavefront.
// This keeps two DATA wavefronts separated by a NULL wavefront. Each bit's
// ko is the NOR of its two output rails: 1 (request for data) while the bit
// holds NULL, 0 (request for null) while it holds DATA. Per-bit ko values are
// combined outside by a completion detector (ncl_comp).
// The TH22 register and 4-phase ki/ko handshake follow standard NCL; reset to
// NULL is this design's choice.
// Timing: zero-delay; q follows d in the step where ki permits it.
module ncl_reg
  import ncl_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic        rst,
  input  dr_t [W-1:0] d,
  input  logic        ki,
  output dr_t [W-1:0] q,
  output logic [W-1:0] ko
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    ncl_th #(.N(2), .M(2)) u_r0 (.rst(rst), .a({ki, d[i].r0}), .z(q[i].r0));
    ncl_th #(.N(2), .M(2)) u_r1 (.rst(rst), .a({ki, d[i].r1}), .z(q[i].r1));
    assign ko[i] = ~(q[i].r0 | q[i].r1);
  end

endmodule
