// tb_trojan_th22: checks the TH22 Trojan (single-bit cell and a 4-bit copy).
// For every b, k and trigger s in {NULL, DATA0, DATA1}, bp must equal b; for
// an ILLEGAL trigger bp must equal k, and after the trigger returns to NULL
// bp must follow b again. Also checks that the trigger gate never asserts
// while s is legal (the property that hides it from observability checks).
module tb_trojan_th22;
  import ncl_pkg::*;

  int checks = 0, failures = 0;
  dr_t b, k, s, bp;
  dr_t [3:0] b4, k4, bp4;
  dr_t vals [4] = '{DR_NULL, DR_DATA0, DR_DATA1, DR_ILLEGAL};

  trojan_th22 dut (.b(b), .k(k), .s(s), .bp(bp));
  trojan_th22 #(.W(4)) dut4 (.b(b4), .k(k4), .s(s), .bp(bp4));

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
    s = DR_NULL; b = DR_NULL; k = DR_NULL; b4 = '0; k4 = '0; #1;
    for (int rep = 0; rep < 3; rep++)
      for (int bi = 1; bi < 3; bi++)
        for (int ki = 1; ki < 3; ki++)
          for (int si = 0; si < 4; si++) begin
            b = vals[bi]; k = vals[ki];
            for (int i = 0; i < 4; i++) begin
              b4[i] = dr_enc(1'($urandom));
              k4[i] = dr_enc(1'($urandom));
            end
            s = vals[si]; #1;
            if (si == 3) begin
              check(bp == k, $sformatf("leak: s ILLEGAL b=%b k=%b", b, k));
              check(bp4 == k4, "4-bit leak");
            end else begin
              check(bp == b, $sformatf("pass: s=%b b=%b k=%b", s, b, k));
              check(bp4 == b4, "4-bit pass");
              check(dut.sel == 1'b0, "trigger gate idle for legal s");
            end
            s = DR_NULL; #1;
            check(bp == b && bp4 == b4, "released when s NULL");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
