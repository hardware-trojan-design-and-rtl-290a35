// tb_ncl_trojan_top: end-to-end test of the whole top level with every
// parameter at its default (8-bit words). It runs the RSA node exactly as its
// own testbench does and, beside it, drives the example cells.
// RSA node: Keys: n = 143 = 11 * 13, e = 7, d = 103.
// Two environment processes run the 4-phase handshakes of the Public Key and
// decryption channels. The test reads n and e, decrypts messages encrypted
// here with (n, e), and then triggers the Trojan: a ciphertext whose bit
// X_BIT is ILLEGAL is held in the input register while e is requested, and
// the Public Key channel must then carry d. The same request with a legal
// ciphertext held must carry e. The trigger gate must stay idle in every
// legal operation. Reverse padding is modelled as the identity.
// Cells: the AND and XOR with all DATA operand pairs; the half and full adder
// with legal operands and with ILLEGAL ones (S must become ILLEGAL); the NAND
// and six-multiplexer Trojans with legal triggers (pass b) and an ILLEGAL
// trigger (leak k). Each mechanism is counted and must occur at least once.
module tb_ncl_trojan_top;
  import ncl_pkg::*;

  localparam int unsigned N = 8, E_W = 4, D_W = 8, X_BIT = 0;
  localparam logic [N-1:0] KN = 8'd143;
  localparam logic [N-1:0] KE = 8'd7;
  localparam logic [N-1:0] KD = 8'd103;

  int checks = 0, failures = 0;

  logic           rst, key_load, ko_pk, ki_pk, ko_c, ki_m;
  dr_t            sel_i;
  dr_t  [N-1:0]   pk_o, c_i, m_o, mp_i, M_o;

  dr_t and_x, and_y, and_z, xor_x, xor_y, xor_z;
  dr_t ha_x, ha_y, ha_s, ha_cout, fa_x, fa_y, fa_ci, fa_s, fa_cout;
  dr_t tn_b, tn_k, tn_s, tn_bp, tm_b, tm_k, tm_s, tm_bp;

  ncl_trojan_top top (
    .rst(rst), .key_load(key_load), .key_n(KN), .key_e(E_W'(KE)), .key_d(D_W'(KD)),
    .rsa_sel_i(sel_i), .rsa_ko_pk(ko_pk), .rsa_pk_o(pk_o), .rsa_ki_pk(ki_pk),
    .rsa_c_i(c_i), .rsa_ko_c(ko_c), .rsa_m_o(m_o), .rsa_mp_i(mp_i), .rsa_M_o(M_o),
    .rsa_ki_m(ki_m),
    .and_x(and_x), .and_y(and_y), .and_z(and_z),
    .xor_x(xor_x), .xor_y(xor_y), .xor_z(xor_z),
    .ha_x(ha_x), .ha_y(ha_y), .ha_s(ha_s), .ha_cout(ha_cout),
    .fa_x(fa_x), .fa_y(fa_y), .fa_ci(fa_ci), .fa_s(fa_s), .fa_cout(fa_cout),
    .tn_b(tn_b), .tn_k(tn_k), .tn_s(tn_s), .tn_bp(tn_bp),
    .tm_b(tm_b), .tm_k(tm_k), .tm_s(tm_s), .tm_bp(tm_bp));

  rev_pad_model #(.N(N)) u_pad (.m(m_o), .mp(mp_i));

  function automatic dr_t [N-1:0] enc(input logic [N-1:0] v);
    dr_t [N-1:0] w;
    for (int i = 0; i < N; i++) w[i] = dr_enc(v[i]);
    return w;
  endfunction

  function automatic logic all_data(input dr_t [N-1:0] w);
    for (int i = 0; i < N; i++) if (!dr_is_data(w[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [N-1:0] val(input dr_t [N-1:0] w);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = w[i].r1;
    return v;
  endfunction

  function automatic int unsigned pw(input int unsigned b, input int unsigned e,
                                     input int unsigned md);
    int unsigned r = 1;
    for (int unsigned i = 0; i < e; i++) r = (r * b) % md;
    return r;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // wait for a condition, polling once per time unit
  task automatic await_ko_pk(input logic v);
    while (ko_pk !== v) #1;
  endtask

  // one Public Key transaction: returns the word delivered
  task automatic pk_request(input logic sel, output logic [N-1:0] got);
    await_ko_pk(1'b1);
    sel_i = dr_enc(sel);
    while (!all_data(pk_o)) #1;
    #1;
    check(all_data(pk_o), "Public Key word complete");
    got = val(pk_o);
    await_ko_pk(1'b0);
    sel_i = DR_NULL;
    ki_pk = 0;
    while (pk_o != '0) #1;
    ki_pk = 1;
    #1;
  endtask

  // present a ciphertext and wait for M; optionally leave c applied
  task automatic dec_start(input dr_t [N-1:0] cw, output logic [N-1:0] got);
    while (ko_c !== 1'b1) #1;
    c_i = cw;
    while (!all_data(M_o)) #1;
    #1;
    got = val(M_o);
  endtask

  task automatic dec_finish();
    while (ko_c !== 1'b0) #1;
    c_i = '0;
    ki_m = 0;
    while (M_o != '0) #1;
    ki_m = 1;
    #1;
    check(ko_c == 1'b1, "c register back to NULL");
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_reads = 0, e_reads = 0, decrypts = 0, leaks = 0;
  int and_ops = 0, xor_ops = 0, ha_ops = 0, fa_ops = 0, ha_ill = 0, fa_ill = 0;
  int tn_pass = 0, tn_leak = 0, tm_pass = 0, tm_leak = 0;
  dr_t vals [4] = '{DR_NULL, DR_DATA0, DR_DATA1, DR_ILLEGAL};

  task automatic cells();
    and_x = DR_NULL; and_y = DR_NULL; xor_x = DR_NULL; xor_y = DR_NULL;
    ha_x = DR_NULL; ha_y = DR_NULL; fa_x = DR_NULL; fa_y = DR_NULL; fa_ci = DR_NULL;
    #1;
    for (int i = 0; i < 8; i++) begin
      logic [2:0] b;
      int tot;
      b = 3'(i);
      tot = b[0] + b[1] + b[2];
      and_x = dr_enc(b[0]); and_y = dr_enc(b[1]);
      xor_x = dr_enc(b[0]); xor_y = dr_enc(b[1]);
      ha_x = dr_enc(b[0]); ha_y = dr_enc(b[1]);
      fa_x = dr_enc(b[0]); fa_y = dr_enc(b[1]); fa_ci = dr_enc(b[2]);
      #1;
      check(and_z == dr_enc(b[0] & b[1]), "AND value"); and_ops++;
      check(xor_z == dr_enc(b[0] ^ b[1]), "XOR value"); xor_ops++;
      check(ha_s == dr_enc(b[0] ^ b[1]) && ha_cout == dr_enc(b[0] & b[1]), "HA value"); ha_ops++;
      check(fa_s == dr_enc(tot[0]) && fa_cout == dr_enc(tot[1]), "FA value"); fa_ops++;
      and_x = DR_NULL; and_y = DR_NULL; xor_x = DR_NULL; xor_y = DR_NULL;
      ha_x = DR_NULL; ha_y = DR_NULL; fa_x = DR_NULL; fa_y = DR_NULL; fa_ci = DR_NULL;
      #1;
      check(and_z == DR_NULL && xor_z == DR_NULL && ha_s == DR_NULL && fa_s == DR_NULL,
            "cells back to NULL");
      // an ILLEGAL x propagates to the sum
      ha_x = DR_ILLEGAL; ha_y = dr_enc(b[1]);
      fa_x = DR_ILLEGAL; fa_y = dr_enc(b[1]); fa_ci = dr_enc(b[2]);
      #1;
      check(dr_is_illegal(ha_s), "HA sum ILLEGAL"); if (dr_is_illegal(ha_s)) ha_ill++;
      check(dr_is_illegal(fa_s), "FA sum ILLEGAL"); if (dr_is_illegal(fa_s)) fa_ill++;
      ha_x = DR_NULL; ha_y = DR_NULL; fa_x = DR_NULL; fa_y = DR_NULL; fa_ci = DR_NULL;
      #1;
    end
    for (int si = 0; si < 4; si++)
      for (int bi = 1; bi < 3; bi++) begin
        tn_b = vals[bi]; tn_k = vals[3 - bi]; tn_s = vals[si];
        tm_b = vals[bi]; tm_k = vals[3 - bi]; tm_s = vals[si];
        #1;
        if (si == 3) begin
          check(tn_bp == tn_k, "NAND Trojan leaks k"); if (tn_bp == tn_k) tn_leak++;
          check(tm_bp == tm_k, "six-mux Trojan leaks k"); if (tm_bp == tm_k) tm_leak++;
        end else begin
          check(tn_bp == tn_b, "NAND Trojan passes b"); tn_pass++;
          check(tm_bp == tm_b, "six-mux Trojan passes b"); tm_pass++;
        end
        tn_s = DR_NULL; tm_s = DR_NULL; #1;
      end
  endtask
  logic trig_seen_legal = 0;

  always @(top.u_rsa.u_trojan.sel) if (top.u_rsa.u_trojan.sel && !dr_is_illegal(c_i[X_BIT])) trig_seen_legal = 1;

  initial begin
    logic [N-1:0] got, p, cv;
    dr_t  [N-1:0] cw;
    rst = 1; key_load = 1; sel_i = DR_NULL; ki_pk = 1; c_i = '0; ki_m = 1;
    and_x = DR_NULL; and_y = DR_NULL; xor_x = DR_NULL; xor_y = DR_NULL;
    ha_x = DR_NULL; ha_y = DR_NULL; fa_x = DR_NULL; fa_y = DR_NULL; fa_ci = DR_NULL;
    tn_b = DR_NULL; tn_k = DR_NULL; tn_s = DR_NULL; tm_b = DR_NULL; tm_k = DR_NULL; tm_s = DR_NULL;
    #2;
    rst = 0; #1; key_load = 0; #1;
    check(pk_o == '0 && M_o == '0 && ko_pk && ko_c, "idle after reset");

    for (int r = 0; r < 3; r++) begin
      pk_request(1'b0, got); check(got == KN, $sformatf("read n: %0d", got)); n_reads++;
      pk_request(1'b1, got); check(got == KE, $sformatf("read e: %0d", got)); e_reads++;
    end

    for (int t = 0; t < 40; t++) begin
      p  = N'($urandom_range(0, 142));
      if (t == 0) p = 8'd65;
      cv = N'(pw(p, KE, KN));
      dec_start(enc(cv), got);
      check(got == p, $sformatf("decrypt c=%0d -> %0d (expected %0d)", cv, got, p));
      decrypts++;
      // a legal ciphertext held in the input register does not disturb e
      if (t % 8 == 0) begin
        pk_request(1'b1, got); check(got == KE, "e with legal c held"); e_reads++;
        pk_request(1'b0, got); check(got == KN, "n with legal c held"); n_reads++;
      end
      dec_finish();
    end
    check(!trig_seen_legal, "trigger gate idle for legal inputs");

    // Trojan: bit X_BIT of c ILLEGAL, e selected -> d leaks
    for (int t = 0; t < 4; t++) begin
      cw = enc(N'($urandom));
      cw[X_BIT] = DR_ILLEGAL;
      dec_start(cw, got);
      check(top.u_rsa.u_trojan.sel == 1'b1, "trigger gate asserted by illegal bit");
      pk_request(1'b1, got);
      check(got == KD, $sformatf("leak of d on Public Key channel: %0d", got));
      if (got == KD) leaks++;
      pk_request(1'b0, got); check(got == KN, "n unaffected by trigger"); n_reads++;
      dec_finish();
      check(top.u_rsa.u_trojan.sel == 1'b0, "trigger released");
      pk_request(1'b1, got); check(got == KE, "e after trigger released"); e_reads++;
    end

    cells();
    $display("n reads %0d, e reads %0d, decryptions %0d, leaks %0d", n_reads, e_reads, decrypts, leaks);
    $display("AND %0d, XOR %0d, HA %0d (illegal %0d), FA %0d (illegal %0d)",
             and_ops, xor_ops, ha_ops, ha_ill, fa_ops, fa_ill);
    $display("NAND Trojan pass %0d leak %0d, six-mux Trojan pass %0d leak %0d",
             tn_pass, tn_leak, tm_pass, tm_leak);
    check(n_reads > 0, "n read happened");
    check(e_reads > 0, "e read happened");
    check(decrypts > 0, "decryption happened");
    check(leaks > 0, "d leak happened");
    check(and_ops > 0 && xor_ops > 0 && ha_ops > 0 && fa_ops > 0, "cell operations happened");
    check(ha_ill > 0 && fa_ill > 0, "illegal propagation happened");
    check(tn_pass > 0 && tn_leak > 0, "NAND Trojan both modes happened");
    check(tm_pass > 0 && tm_leak > 0, "six-mux Trojan both modes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
