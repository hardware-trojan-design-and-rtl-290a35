// tb_trojan_mux6: checks the six-multiplexer Trojan.
// For every b, k and trigger s in {NULL, DATA0, DATA1}, bp must equal b; for
// an ILLEGAL trigger bp must equal k, and after the trigger returns to NULL
// bp must follow b again. Also checks that with s = DATA1 the lower
// (S^1-selected) multiplexer pair switches although bp takes the upper pair.
module tb_trojan_mux6;
  import ncl_pkg::*;

  int checks = 0, failures = 0;
  dr_t b, k, s, bp;
  dr_t vals [4] = '{DR_NULL, DR_DATA0, DR_DATA1, DR_ILLEGAL};

  trojan_mux6 dut (.b(b), .k(k), .s(s), .bp(bp));

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
    s = DR_NULL; b = DR_NULL; k = DR_NULL; #1;
    for (int rep = 0; rep < 3; rep++)
      for (int bi = 1; bi < 3; bi++)
        for (int ki = 1; ki < 3; ki++)
          for (int si = 0; si < 4; si++) begin
            b = vals[bi]; k = vals[ki];
            s = vals[si]; #1;
            if (si == 3) begin
              check(bp == k, $sformatf("leak: s ILLEGAL b=%b k=%b", b, k));
            end else begin
              check(bp == b, $sformatf("pass: s=%b b=%b k=%b", s, b, k));
              if (si == 2) check(dut.u == k && dut.t == b, "lower pair switches unobserved");
            end
            s = DR_NULL; #1;
            check(bp == b, "released when s NULL");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
