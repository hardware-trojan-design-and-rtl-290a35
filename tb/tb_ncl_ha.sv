// tb_ncl_ha: checks the NCL half adder. Legal part: for every pair of DATA
// operands, S stays NULL with one operand present, then S = x xor y and
// Cout = x and y, and S holds DATA until both operands are NULL. Illegal part:
// for every operand pair drawn from {DATA0, DATA1, ILLEGAL} with at least one
// ILLEGAL, S must be ILLEGAL; with x ILLEGAL and y DATA0, Cout must be DATA0.
module tb_ncl_ha;
  import ncl_pkg::*;

  int checks = 0, failures = 0;
  dr_t x, y, s, cout;
  dr_t vals [3] = '{DR_DATA0, DR_DATA1, DR_ILLEGAL};

  ncl_ha dut (.x(x), .y(y), .s(s), .cout(cout));

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
    x = DR_NULL; y = DR_NULL; #1;
    check(s == DR_NULL && cout == DR_NULL, "initial NULL");
    for (int i = 0; i < 4; i++) begin
      logic xb, yb;
      xb = i[0]; yb = i[1];
      x = dr_enc(xb); #1;
      check(s == DR_NULL, $sformatf("S waits for y, x=%b", xb));
      y = dr_enc(yb); #1;
      check(s == dr_enc(xb ^ yb), $sformatf("sum x=%b y=%b", xb, yb));
      check(cout == dr_enc(xb & yb), $sformatf("carry x=%b y=%b", xb, yb));
      x = DR_NULL; #1;
      check(s == dr_enc(xb ^ yb), "sum held until all NULL");
      y = DR_NULL; #1;
      check(s == DR_NULL && cout == DR_NULL, "back to NULL");
    end
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        if (i != 2 && j != 2) continue;
        x = vals[i]; y = vals[j]; #1;
        check(dr_is_illegal(s), $sformatf("illegal propagates to S: x=%b y=%b", x, y));
        if (i == 2 && j == 0)
          check(cout == DR_DATA0, "x ILLEGAL, y DATA0 gives Cout DATA0");
        x = DR_NULL; y = DR_NULL; #1;
        check(s == DR_NULL && cout == DR_NULL, "NULL after illegal");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
