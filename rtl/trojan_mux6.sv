// trojan_mux6: illegal-state hardware Trojan built only from multiplexers.
//
// Six Boolean 2:1 multiplexers, each choosing one rail (input 0 = normal b,
// input 1 = secret k). The upper left pair is selected by S^0 and gives
// t = S^0 ? k : b; the lower left pair is selected by S^1 and gives
// u = S^1 ? k : b. The output pair, selected by S^0, gives bp = S^0 ? u : t.
// DATA0 on s picks u = b, DATA1 and NULL pick t = b, and only ILLEGAL picks
// u = k. The lower pair switches without being needed for the output, so an
// observability check flags it.
// Six multiplexers, their 0/1 inputs and the S^0/S^1 selects of the left
// pairs and output pair follow the six-multiplexer Trojan; which pair feeds
// which output input is this design's reading, fixed by the required
// behaviour. Zero-delay, no state.
module trojan_mux6
  import ncl_pkg::*;
(
  input  dr_t b,
  input  dr_t k,
  input  dr_t s,
  output dr_t bp
);

  dr_t t, u;

  assign t.r0  = s.r0 ? k.r0 : b.r0;
  assign t.r1  = s.r0 ? k.r1 : b.r1;
  assign u.r0  = s.r1 ? k.r0 : b.r0;
  assign u.r1  = s.r1 ? k.r1 : b.r1;
  assign bp.r0 = s.r0 ? u.r0 : t.r0;
  assign bp.r1 = s.r0 ? u.r1 : t.r1;

endmodule
