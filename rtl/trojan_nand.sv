// trojan_nand: illegal-state hardware Trojan, NAND variant.
//
// Same multiplexers as the TH22 variant, but the select is a Boolean NAND of
// the trigger rails and the multiplexer inputs are swapped (input 1 = normal
// word b, input 0 = secret k). The NAND output is 1 for NULL and DATA on s, so
// bp = b; an ILLEGAL s drives it to 0 and bp = k. The NAND stays high through
// the NULL phase, which is why an observability check flags this variant.
// Structure follows the NAND/multiplexer Trojan. Zero-delay, no state.
module trojan_nand
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

  assign sel = ~(s.r0 & s.r1);
  assign bp  = sel ? b : k;

endmodule
