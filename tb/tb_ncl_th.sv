// tb_ncl_th: checks the generic threshold gate against a reference model of
// the threshold rule with hysteresis, for a plain TH22, a weighted TH34w2 and
// a TH22 that resets to 1. Random input sequences; the expected output is
// recomputed from the weights after every step.
module tb_ncl_th;

  int checks = 0, failures = 0;

  logic       rst;
  logic [1:0] a22;
  logic [3:0] a34;
  logic       z22, z34, z22d;
  logic       e22, e34, e22d;

  ncl_th #(.N(2), .M(2)) u_22 (.rst(rst), .a(a22), .z(z22));
  ncl_th #(.N(4), .M(3), .WT({4'd1, 4'd1, 4'd1, 4'd2})) u_34 (.rst(rst), .a(a34), .z(z34));
  ncl_th #(.N(2), .M(2), .RST_VAL(1'b1)) u_22d (.rst(rst), .a(a22), .z(z22d));

  function automatic logic next(input logic cur, input int sum, input int m, input logic any);
    if (sum >= m) return 1'b1;
    if (!any) return 1'b0;
    return cur;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s34;
    rst = 1; a22 = 2'b11; a34 = 4'b1111;
    #1;
    check(z22 == 0 && z34 == 0 && z22d == 1, "reset values");
    e22 = 0; e34 = 0; e22d = 1;
    rst = 0;
    // inputs still all asserted: sets
    #1;
    e22 = 1; e34 = 1; e22d = 1;
    check(z22 == e22 && z34 == e34 && z22d == e22d, "set after reset");
    for (int it = 0; it < 2000; it++) begin
      a22 = 2'($urandom);
      a34 = 4'($urandom);
      #1;
      s34 = (a34[0] ? 2 : 0) + a34[1] + a34[2] + a34[3];
      e22  = next(e22,  a22[0] + a22[1], 2, |a22);
      e22d = next(e22d, a22[0] + a22[1], 2, |a22);
      e34  = next(e34,  s34, 3, |a34);
      check(z22 == e22, $sformatf("TH22 a=%b", a22));
      check(z22d == e22d, $sformatf("TH22 (reset 1) a=%b", a22));
      check(z34 == e34, $sformatf("TH34w2 a=%b", a34));
    end
    // weight: the weighted input alone with one other reaches 3
    a34 = 4'b0000; #1; check(z34 == 0, "TH34w2 cleared");
    a34 = 4'b0011; #1; check(z34 == 1, "TH34w2 weight-2 input plus one");
    a34 = 4'b0010; #1; check(z34 == 1, "TH34w2 hysteresis holds");
    a34 = 4'b0000; #1; check(z34 == 0, "TH34w2 releases when all low");
    a34 = 4'b1110; #1; check(z34 == 1, "TH34w2 three unit inputs");
    a34 = 4'b0000; #1;
    a34 = 4'b0110; #1; check(z34 == 0, "TH34w2 two unit inputs stay low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
