// tb_ncl_comp: checks the completion detector (W = 5) against a C-element
// reference: output 1 when all inputs are 1, 0 when all are 0, unchanged
// otherwise. Random input sequences biased toward all-equal words.
module tb_ncl_comp;

  localparam int unsigned W = 5;
  int checks = 0, failures = 0;
  logic [W-1:0] ko_i;
  logic         ko, exp_ko;
  int           rises = 0, falls = 0;

  ncl_comp #(.W(W)) dut (.ko_i(ko_i), .ko(ko));

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
    ko_i = '0; #1;
    exp_ko = 0;
    check(ko == 0, "all low gives 0");
    for (int it = 0; it < 3000; it++) begin
      case ($urandom_range(0, 3))
        0: ko_i = '1;
        1: ko_i = '0;
        default: ko_i = W'($urandom);
      endcase
      #1;
      if (ko_i == '1) begin
        if (!exp_ko) rises++;
        exp_ko = 1;
      end else if (ko_i == '0) begin
        if (exp_ko) falls++;
        exp_ko = 0;
      end
      check(ko == exp_ko, $sformatf("ko_i=%b", ko_i));
    end
    check(rises > 10 && falls > 10, "both transitions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
