// tb_ncl_xor: exhaustive check of the observable NCL XOR. For every pair
// of DATA operands it checks NULL -> one operand -> both operands -> one
// removed -> NULL: the output stays NULL until both operands are DATA, equals
// x XOR y, and stays DATA until both operands are NULL again.
module tb_ncl_xor;
  import ncl_pkg::*;

  int checks = 0, failures = 0;
  dr_t x, y, z;

  ncl_xor dut (.x(x), .y(y), .z(z));

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
    check(z == DR_NULL, "initial NULL");
    for (int i = 0; i < 4; i++) begin
      for (int first = 0; first < 2; first++) begin
        logic xb, yb;
        xb = i[0]; yb = i[1];
        if (first == 0) x = dr_enc(xb); else y = dr_enc(yb);
        #1;
        check(z == DR_NULL, $sformatf("input-complete x=%b y=%b first=%0d", xb, yb, first));
        x = dr_enc(xb); y = dr_enc(yb); #1;
        check(z == dr_enc(xb ^ yb), $sformatf("value x=%b y=%b", xb, yb));
        if (first == 0) x = DR_NULL; else y = DR_NULL;
        #1;
        check(z == dr_enc(xb ^ yb), $sformatf("held x=%b y=%b", xb, yb));
        x = DR_NULL; y = DR_NULL; #1;
        check(z == DR_NULL, "back to NULL");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
