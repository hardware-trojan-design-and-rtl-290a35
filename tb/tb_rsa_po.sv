// tb_rsa_po: proof-obligation Trojan detection on the whole RSA node.
//
// Every threshold gate (ncl_th) of the node gets a bound monitor. Phase 1
// (PO1) drives only NULL and DATA: with 2-bit words it runs every combination
// of the keys n, e, d, every ciphertext and both selects through complete
// 4-phase transactions. Phase 2 (PO2) adds ILLEGAL values on each ciphertext
// bit and on the select. A gate that asserted in phase 2 but never in phase 1
// is flagged as a potential Trojan. Expected: exactly one flagged gate, the
// trigger inside u_trojan. Keys are Boolean register contents and so are
// never ILLEGAL.
module tb_rsa_po;
  import ncl_pkg::*;

  localparam int unsigned N = 2;

  bind ncl_th po_mon u_po_mon (.z(z));

  int checks = 0, failures = 0;
  logic           rst, key_load, ko_pk, ki_pk, ko_c, ki_m;
  logic [N-1:0]   kn, ke, kd;
  dr_t            sel_i;
  dr_t  [N-1:0]   pk_o, c_i, m_o, mp_i, M_o;

  rsa_ncl #(.N(N), .E_W(N), .D_W(N), .X_BIT(0)) dut (
    .rst(rst), .key_load(key_load), .key_n(kn), .key_e(ke), .key_d(kd),
    .sel_i(sel_i), .ko_pk(ko_pk), .pk_o(pk_o), .ki_pk(ki_pk),
    .c_i(c_i), .ko_c(ko_c), .m_o(m_o), .mp_i(mp_i), .M_o(M_o), .ki_m(ki_m));

  rev_pad_model #(.N(N)) u_pad (.m(m_o), .mp(mp_i));

  function automatic logic arrived(input dr_t [N-1:0] w);
    for (int i = 0; i < N; i++) if (!(w[i].r0 || w[i].r1)) return 1'b0;
    return 1'b1;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pk_cycle(input dr_t s);
    while (ko_pk !== 1'b1) #1;
    sel_i = s;
    while (!arrived(pk_o)) #1;
    while (ko_pk !== 1'b0) #1;
    sel_i = DR_NULL;
    ki_pk = 0;
    while (pk_o != '0) #1;
    ki_pk = 1;
    #1;
  endtask

  task automatic dec_start(input dr_t [N-1:0] cw);
    while (ko_c !== 1'b1) #1;
    c_i = cw;
    while (!arrived(M_o)) #1;
  endtask

  task automatic dec_finish();
    while (ko_c !== 1'b0) #1;
    c_i = '0;
    ki_m = 0;
    while (M_o != '0) #1;
    ki_m = 1;
    #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dr_t vals [4] = '{DR_NULL, DR_DATA0, DR_DATA1, DR_ILLEGAL};

  initial begin
    dr_t [N-1:0] cw;
    int flagged = 0, gates = 0;
    rst = 1; key_load = 1; kn = '0; ke = '0; kd = '0;
    sel_i = DR_NULL; ki_pk = 1; c_i = '0; ki_m = 1;
    #2; rst = 0; #1; key_load = 0; #1;
    tb_po_pkg::armed = 1'b1;

    // phase 1: NULL and DATA only, all keys
    for (int k = 0; k < 64; k++) begin
      {kn, ke, kd} = 6'(k);
      key_load = 1; #1; key_load = 0; #1;
      for (int c = 0; c < 4; c++) begin
        for (int i = 0; i < N; i++) cw[i] = dr_enc(c[i]);
        dec_start(cw);
        pk_cycle(DR_DATA0);
        pk_cycle(DR_DATA1);
        dec_finish();
      end
    end

    // phase 2: ILLEGAL values on the ciphertext bits and on the select
    tb_po_pkg::legal_phase = 1'b0;
    for (int k = 0; k < 64; k += 7) begin
      {kn, ke, kd} = 6'(k);
      key_load = 1; #1; key_load = 0; #1;
      for (int c0 = 1; c0 < 4; c0++)
        for (int c1 = 1; c1 < 4; c1++) begin
          cw[0] = vals[c0]; cw[1] = vals[c1];
          dec_start(cw);
          pk_cycle(DR_DATA1);
          pk_cycle(DR_ILLEGAL);
          dec_finish();
        end
    end

    foreach (tb_po_pkg::po2[name]) begin
      logic flag;
      gates++;
      flag = !tb_po_pkg::po1.exists(name);
      if (flag) begin
        flagged++;
        $display("flagged as potential Trojan: %s", name);
        check(name.substr(0, 19) == "tb_rsa_po.dut.u_troj", $sformatf("unexpected flag %s", name));
      end
    end
    $display("%0d gates asserted, %0d flagged", gates, flagged);
    // 2 select-register, 6N register, 3 completion, 8N multiplexer and 1
    // Trojan gate
    check(gates == 6 + 14 * N, "every threshold gate asserted at least once");
    check(flagged == 1, "exactly one gate flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
