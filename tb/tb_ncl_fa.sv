// tb_ncl_fa: checks the NCL full adder. Legal part: for all eight DATA input
// sets, applied one operand at a time in a random order, S stays NULL until
// the last operand arrives, then {Cout, S} = x + y + ci, and S holds DATA until
// every input is NULL. Illegal part: for every input set drawn from
// {DATA0, DATA1, ILLEGAL} with at least one ILLEGAL, S must be ILLEGAL.
module tb_ncl_fa;
  import ncl_pkg::*;

  int checks = 0, failures = 0;
  dr_t x, y, ci, s, cout;
  dr_t vals [3] = '{DR_DATA0, DR_DATA1, DR_ILLEGAL};

  ncl_fa dut (.x(x), .y(y), .ci(ci), .s(s), .cout(cout));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic drive(input int which, input dr_t v);
    case (which)
      0: x = v;
      1: y = v;
      default: ci = v;
    endcase
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = DR_NULL; y = DR_NULL; ci = DR_NULL; #1;
    check(s == DR_NULL && cout == DR_NULL, "initial NULL");
    for (int rep = 0; rep < 4; rep++)
      for (int i = 0; i < 8; i++) begin
        logic [2:0] b;
        int order [3];
        int total;
        b = 3'(i);
        total = b[0] + b[1] + b[2];
        order[0] = $urandom_range(0, 2);
        order[1] = (order[0] + 1 + $urandom_range(0, 1)) % 3;
        order[2] = 3 - order[0] - order[1];
        drive(order[0], dr_enc(b[order[0]])); #1;
        check(s == DR_NULL, "S waits (1 of 3)");
        drive(order[1], dr_enc(b[order[1]])); #1;
        check(s == DR_NULL, "S waits (2 of 3)");
        drive(order[2], dr_enc(b[order[2]])); #1;
        check(s == dr_enc(total[0]), $sformatf("sum of %b", b));
        check(cout == dr_enc(total[1]), $sformatf("carry of %b", b));
        drive(order[0], DR_NULL); drive(order[1], DR_NULL); #1;
        // a carry gate may release once its own three rails are low, but S
        // must hold DATA until the last input is NULL
        check(s == dr_enc(total[0]), "S held until all NULL");
        drive(order[2], DR_NULL); #1;
        check(s == DR_NULL && cout == DR_NULL, "back to NULL");
      end
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        for (int k = 0; k < 3; k++) begin
          if (i != 2 && j != 2 && k != 2) continue;
          x = vals[i]; y = vals[j]; ci = vals[k]; #1;
          check(dr_is_illegal(s), $sformatf("illegal propagates: x=%b y=%b ci=%b", x, y, ci));
          x = DR_NULL; y = DR_NULL; ci = DR_NULL; #1;
          check(s == DR_NULL && cout == DR_NULL, "NULL after illegal");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
