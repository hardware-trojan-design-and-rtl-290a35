// tb_ncl_reg: checks a 4-bit NCL register stage through repeated 4-phase
// cycles with random words: NULL after reset; DATA passes only while ki = 1;
// DATA is held when ki falls until the input returns to NULL; NULL passes
// only while ki = 0; ko is the per-bit NOR of the output rails.
module tb_ncl_reg;
  import ncl_pkg::*;

  localparam int unsigned W = 4;
  int checks = 0, failures = 0;
  logic        rst, ki;
  dr_t [W-1:0] d, q, word;
  logic [W-1:0] ko;

  ncl_reg #(.W(W)) dut (.rst(rst), .d(d), .ki(ki), .q(q), .ko(ko));

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
    rst = 1; ki = 1; d = '0; #1;
    for (int i = 0; i < W; i++) d[i] = DR_DATA1;
    #1;
    check(q == '0 && ko == '1, "reset holds NULL");
    d = '0; #1;
    rst = 0; #1;
    check(q == '0 && ko == '1, "NULL after reset");
    for (int it = 0; it < 200; it++) begin
      for (int i = 0; i < W; i++) word[i] = dr_enc(1'($urandom));
      // DATA blocked while the next stage requests NULL
      ki = 0; d = word; #1;
      check(q == '0, "DATA blocked while ki = 0");
      ki = 1; #1;
      check(q == word && ko == '0, "DATA passes on ki = 1");
      ki = 0; #1;
      check(q == word, "DATA held after ki falls");
      // NULL blocked while the next stage requests DATA
      ki = 1; d = '0; #1;
      check(q == word, "NULL blocked while ki = 1");
      ki = 0; #1;
      check(q == '0 && ko == '1, "NULL passes on ki = 0");
      ki = 1; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
