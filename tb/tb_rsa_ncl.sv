// tb_rsa_ncl: end-to-end test of the NCL RSA node with its Trojan, at the
// default sizes (8-bit words). Keys: n = 143 = 11 * 13, e = 7, d = 103.
// Two environment processes run the 4-phase handshakes of the Public Key and
// decryption channels. The test reads n and e, decrypts messages encrypted
// here with (n, e), and then triggers the Trojan: a ciphertext whose bit
// X_BIT is ILLEGAL is held in the input register while e is requested, and
// the Public Key channel must then carry d. The same request with a legal
// ciphertext held must carry e. The trigger gate must stay idle in every
// legal operation. Reverse padding is modelled as the identity.
module tb_rsa_ncl;
  import ncl_pkg::*;

  localparam int unsigned N = 8, E_W = 4, D_W = 8, X_BIT = 0;
  localparam logic [N-1:0] KN = 8'd143;
  localparam logic [N-1:0] KE = 8'd7;
  localparam logic [N-1:0] KD = 8'd103;

  int checks = 0, failures = 0;

  logic           rst, key_load, ko_pk, ki_pk, ko_c, ki_m;
  dr_t            sel_i;
  dr_t  [N-1:0]   pk_o, c_i, m_o, mp_i, M_o;

  rsa_ncl dut (
    .rst(rst), .key_load(key_load), .key_n(KN), .key_e(E_W'(KE)), .key_d(D_W'(KD)),
    .sel_i(sel_i), .ko_pk(ko_pk), .pk_o(pk_o), .ki_pk(ki_pk),
    .c_i(c_i), .ko_c(ko_c), .m_o(m_o), .mp_i(mp_i), .M_o(M_o), .ki_m(ki_m));

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
  logic trig_seen_legal = 0;

  always @(dut.u_trojan.sel) if (dut.u_trojan.sel && !dr_is_illegal(c_i[X_BIT])) trig_seen_legal = 1;

  initial begin
    logic [N-1:0] got, p, cv;
    dr_t  [N-1:0] cw;
    rst = 1; key_load = 1; sel_i = DR_NULL; ki_pk = 1; c_i = '0; ki_m = 1;
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
      check(dut.u_trojan.sel == 1'b1, "trigger gate asserted by illegal bit");
      pk_request(1'b1, got);
      check(got == KD, $sformatf("leak of d on Public Key channel: %0d", got));
      if (got == KD) leaks++;
      pk_request(1'b0, got); check(got == KN, "n unaffected by trigger"); n_reads++;
      dec_finish();
      check(dut.u_trojan.sel == 1'b0, "trigger released");
      pk_request(1'b1, got); check(got == KE, "e after trigger released"); e_reads++;
    end

    $display("n reads %0d, e reads %0d, decryptions %0d, leaks %0d", n_reads, e_reads, decrypts, leaks);
    check(n_reads > 0 && e_reads > 0 && decrypts > 0 && leaks > 0, "every operation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
