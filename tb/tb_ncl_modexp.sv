// tb_ncl_modexp: checks m = c^d mod n for random 8-bit operands, with the
// expected value found by d repeated modular multiplications (a different
// method from the block's square-and-multiply). The output must stay NULL
// until c, d and n are all DATA and hold DATA until all are NULL.
module tb_ncl_modexp;
  import ncl_pkg::*;

  localparam int unsigned N = 8;
  int checks = 0, failures = 0;
  dr_t [N-1:0] c, d, n, m;

  ncl_modexp #(.N(N)) dut (.c(c), .d(d), .n(n), .m(m));

  function automatic dr_t [N-1:0] enc(input logic [N-1:0] v);
    dr_t [N-1:0] w;
    for (int i = 0; i < N; i++) w[i] = dr_enc(v[i]);
    return w;
  endfunction

  function automatic int unsigned ref_pow(input int unsigned cb, input int unsigned e,
                                          input int unsigned md);
    int unsigned r;
    r = 1 % md;
    for (int unsigned i = 0; i < e; i++) r = (r * (cb % md)) % md;
    return r;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] cv, dv, nv, ev;
    c = '0; d = '0; n = '0; #1;
    check(m == '0, "initial NULL");
    for (int it = 0; it < 300; it++) begin
      nv = N'($urandom_range(2, 255));
      cv = N'($urandom);
      dv = N'($urandom);
      if (it == 0) begin nv = 8'd143; dv = 8'd103; cv = 8'd63; end
      ev = N'(ref_pow(cv, dv, nv));
      n = enc(nv); #1; check(m == '0, "waits for c and d");
      d = enc(dv); #1; check(m == '0, "waits for c");
      c = enc(cv); #1;
      check(m == enc(ev), $sformatf("%0d^%0d mod %0d = %0d", cv, dv, nv, ev));
      c = '0; d = '0; #1; check(m == enc(ev), "held while n is DATA");
      n = '0; #1; check(m == '0, "NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
