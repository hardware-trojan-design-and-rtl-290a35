// rsa_ncl: asynchronous NCL RSA decryption node with an illegal-state Trojan.
//
// The node (the receiver "A" of an RSA exchange) has two NCL channels:
//  * Public Key channel: a 1-bit dual-rail n/e Select goes through an input
//    register; an input-complete NCL multiplexer then puts the modulus n
//    (select DATA0) or the public exponent e (select DATA1) on an output
//    register. n and e are read through read ports of their key registers.
//  * Decryption channel: the padded ciphertext c goes through an input
//    register into combinational logic computing m = c^d mod n with the
//    private exponent d. m leaves on m_o for reverse padding, whose result
//    comes back on mp_i into the M output register.
// The Trojan (trojan_th22, W = N) sits between the e register and the
// multiplexer: a TH22 gate on both rails of bit X_BIT of the registered c
// switches the multiplexer input from e to d. So sending a ciphertext with
// that bit ILLEGAL and then selecting e puts the private key on the Public
// Key channel. With legal inputs the node behaves exactly like the clean
// design and passes input-completeness and observability checks.
//
// Handshake: 4-phase NCL. ki = 1 requests DATA, ki = 0 requests NULL; ko of a
// register is 1 while it holds NULL. The completion of the Public Key output
// register drives the select register's ki and the read ports of n and e and
// the d port feeding the Trojan; the completion of the M register drives the
// c register's ki and the read ports of n and d feeding the exponentiation.
// ko_pk (select register) and ko_c (c register) go to the senders; ki_pk and
// ki_m come from the receivers.
// Each completion signal reaches back to the request of the register whose
// output it completes (through the key read ports, the multiplexer or the
// exponentiation), so the netlist has combinational loops through the
// hysteresis latches; lint reports them (UNOPTFLAT on pk_done). These loops
// are the asynchronous handshake itself and stand as intended.
// From the RSA node: the blocks, their connections, the read ports, the MSB
// DATA0 padding of e and d, the Trojan and its trigger. This design's own:
// the widths (N, E_W, D_W), the Trojan bit X_BIT, key loading through a
// level-sensitive load, reset of every register to NULL, which read port
// serves which reader, and the ki of the M register brought out as ki_m.
module rsa_ncl
  import ncl_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned E_W   = 4,
  parameter int unsigned D_W   = 8,
  parameter int unsigned X_BIT = 0
) (
  input  logic           rst,
  // key registers
  input  logic           key_load,
  input  logic [N-1:0]   key_n,
  input  logic [E_W-1:0] key_e,
  input  logic [D_W-1:0] key_d,
  // Public Key channel
  input  dr_t            sel_i,
  output logic           ko_pk,
  output dr_t  [N-1:0]   pk_o,
  input  logic           ki_pk,
  // decryption channel
  input  dr_t  [N-1:0]   c_i,
  output logic           ko_c,
  output dr_t  [N-1:0]   m_o,
  input  dr_t  [N-1:0]   mp_i,
  output dr_t  [N-1:0]   M_o,
  input  logic           ki_m
);

  // Public Key side
  logic                 pk_done;   // completion of the Public Key output register
  logic [0:0]           sel_ko;
  dr_t  [0:0]           sel_q;
  dr_t  [1:0][N-1:0]    n_q;       // port 0: multiplexer, port 1: exponentiation
  dr_t  [0:0][N-1:0]    e_q;
  dr_t  [1:0][N-1:0]    d_q;       // port 0: exponentiation, port 1: Trojan
  dr_t  [N-1:0]         tro_q;
  dr_t  [N-1:0]         mux_q;
  logic [N-1:0]         pk_ko;

  // decryption side
  logic                 m_done;    // completion of the M output register
  dr_t  [N-1:0]         c_q;
  logic [N-1:0]         c_ko;
  logic [N-1:0]         m_ko;

  ncl_reg #(.W(1)) u_sel_reg (
    .rst(rst), .d(sel_i), .ki(pk_done), .q(sel_q), .ko(sel_ko));
  assign ko_pk = sel_ko[0];

  ncl_keyreg #(.W(N), .VW(N), .PORTS(2)) u_n_reg (
    .rst(rst), .load(key_load), .val(key_n), .ki({m_done, pk_done}), .q(n_q));

  ncl_keyreg #(.W(N), .VW(E_W), .PORTS(1)) u_e_reg (
    .rst(rst), .load(key_load), .val(key_e), .ki(pk_done), .q(e_q));

  ncl_keyreg #(.W(N), .VW(D_W), .PORTS(2)) u_d_reg (
    .rst(rst), .load(key_load), .val(key_d), .ki({pk_done, m_done}), .q(d_q));

  trojan_th22 #(.W(N)) u_trojan (
    .b(e_q[0]), .k(d_q[1]), .s(c_q[X_BIT]), .bp(tro_q));

  ncl_mux_ic #(.W(N)) u_mux (
    .a(n_q[0]), .b(tro_q), .s(sel_q[0]), .f(mux_q));

  ncl_reg #(.W(N)) u_pk_reg (
    .rst(rst), .d(mux_q), .ki(ki_pk), .q(pk_o), .ko(pk_ko));

  ncl_comp #(.W(N)) u_pk_comp (.ko_i(pk_ko), .ko(pk_done));

  ncl_reg #(.W(N)) u_c_reg (
    .rst(rst), .d(c_i), .ki(m_done), .q(c_q), .ko(c_ko));

  ncl_comp #(.W(N)) u_c_comp (.ko_i(c_ko), .ko(ko_c));

  ncl_modexp #(.N(N)) u_modexp (
    .c(c_q), .d(d_q[0]), .n(n_q[1]), .m(m_o));

  ncl_reg #(.W(N)) u_m_reg (
    .rst(rst), .d(mp_i), .ki(ki_m), .q(M_o), .ko(m_ko));

  ncl_comp #(.W(N)) u_m_comp (.ko_i(m_ko), .ko(m_done));

endmodule
