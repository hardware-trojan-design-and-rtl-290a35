// ncl_trojan_top: top level of the NCL illegal-state Trojan design.
//
// Holds, side by side and each with its own ports:
//  * rsa_ncl, the asynchronous RSA decryption node with the TH22 Trojan that
//    leaks the private exponent d on the Public Key channel (the main design);
//  * the NCL example cells through which an illegal value is shown to
//    propagate or be exploited: the input-complete AND, the observable XOR,
//    the half adder and full adder, and the two other Trojan variants
//    (NAND-selected and six-multiplexer).
// The reverse-padding logic of the RSA node is outside this top: its input m
// leaves on rsa_m_o and its result returns on rsa_mp_i.
// All ports are dual-rail (ncl_pkg::dr_t) except resets, key loading and the
// handshake requests. Timing and handshakes are those of the instantiated
// blocks; the cells are zero-delay combinational logic with hysteresis.
module ncl_trojan_top
  import ncl_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned E_W   = 4,
  parameter int unsigned D_W   = 8,
  parameter int unsigned X_BIT = 0
) (
  // RSA node
  input  logic           rst,
  input  logic           key_load,
  input  logic [N-1:0]   key_n,
  input  logic [E_W-1:0] key_e,
  input  logic [D_W-1:0] key_d,
  input  dr_t            rsa_sel_i,
  output logic           rsa_ko_pk,
  output dr_t  [N-1:0]   rsa_pk_o,
  input  logic           rsa_ki_pk,
  input  dr_t  [N-1:0]   rsa_c_i,
  output logic           rsa_ko_c,
  output dr_t  [N-1:0]   rsa_m_o,
  input  dr_t  [N-1:0]   rsa_mp_i,
  output dr_t  [N-1:0]   rsa_M_o,
  input  logic           rsa_ki_m,
  // input-complete AND
  input  dr_t            and_x,
  input  dr_t            and_y,
  output dr_t            and_z,
  // observable XOR
  input  dr_t            xor_x,
  input  dr_t            xor_y,
  output dr_t            xor_z,
  // half adder
  input  dr_t            ha_x,
  input  dr_t            ha_y,
  output dr_t            ha_s,
  output dr_t            ha_cout,
  // full adder
  input  dr_t            fa_x,
  input  dr_t            fa_y,
  input  dr_t            fa_ci,
  output dr_t            fa_s,
  output dr_t            fa_cout,
  // NAND-selected Trojan
  input  dr_t            tn_b,
  input  dr_t            tn_k,
  input  dr_t            tn_s,
  output dr_t            tn_bp,
  // six-multiplexer Trojan
  input  dr_t            tm_b,
  input  dr_t            tm_k,
  input  dr_t            tm_s,
  output dr_t            tm_bp
);

  rsa_ncl #(.N(N), .E_W(E_W), .D_W(D_W), .X_BIT(X_BIT)) u_rsa (
    .rst(rst), .key_load(key_load), .key_n(key_n), .key_e(key_e), .key_d(key_d),
    .sel_i(rsa_sel_i), .ko_pk(rsa_ko_pk), .pk_o(rsa_pk_o), .ki_pk(rsa_ki_pk),
    .c_i(rsa_c_i), .ko_c(rsa_ko_c), .m_o(rsa_m_o), .mp_i(rsa_mp_i),
    .M_o(rsa_M_o), .ki_m(rsa_ki_m));

  ncl_and u_and (.x(and_x), .y(and_y), .z(and_z));

  ncl_xor u_xor (.x(xor_x), .y(xor_y), .z(xor_z));

  ncl_ha u_ha (.x(ha_x), .y(ha_y), .s(ha_s), .cout(ha_cout));

  ncl_fa u_fa (.x(fa_x), .y(fa_y), .ci(fa_ci), .s(fa_s), .cout(fa_cout));

  trojan_nand #(.W(1)) u_tn (.b(tn_b), .k(tn_k), .s(tn_s), .bp(tn_bp));

  trojan_mux6 u_tm (.b(tm_b), .k(tm_k), .s(tm_s), .bp(tm_bp));

endmodule
