// ncl_comp: completion detector joining the per-bit ko signals of a register.
//
// The output rises only when every input is 1 (the whole word is NULL) and
// falls only when every input is 0 (the whole word is DATA); otherwise it holds
// (a W-input C-element, i.e. a THnn gate with hysteresis). A gate-level
// implementation would use a tree of TH44 gates with the same behaviour; this
// design uses one wide threshold gate.
// Zero-delay.
module ncl_comp #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] ko_i,
  output logic         ko
);

  ncl_th #(.N(W), .M(W)) u_c (.rst(1'b0), .a(ko_i), .z(ko));

endmodule
