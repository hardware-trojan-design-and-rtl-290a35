// tb_ncl_keyreg: checks a key register with an 8-bit word, a 5-bit stored
// value and two read ports. Each port must give the stored value, padded with
// DATA0 above bit 4, while its ki is 1 and NULL while it is 0, independently of
// the other port; rst gives NULL on both ports; a new load replaces the value.
module tb_ncl_keyreg;
  import ncl_pkg::*;

  localparam int unsigned W = 8, VW = 5, P = 2;
  int checks = 0, failures = 0;
  logic                 rst, load;
  logic [VW-1:0]        val, stored;
  logic [P-1:0]         ki;
  dr_t  [P-1:0][W-1:0]  q;

  ncl_keyreg #(.W(W), .VW(VW), .PORTS(P)) dut (
    .rst(rst), .load(load), .val(val), .ki(ki), .q(q));

  function automatic logic word_ok(input dr_t [W-1:0] w, input logic [VW-1:0] v);
    for (int i = 0; i < W; i++) begin
      if (i < VW) begin
        if (w[i] != dr_enc(v[i])) return 1'b0;
      end else if (w[i] != DR_DATA0) return 1'b0;
    end
    return 1'b1;
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
    rst = 1; load = 0; val = '0; ki = '1; #1;
    check(q == '0, "NULL during reset");
    rst = 0;
    for (int it = 0; it < 50; it++) begin
      stored = VW'($urandom);
      val = stored; load = 1; #1; load = 0;
      val = ~stored; #1;
      for (int r = 0; r < 8; r++) begin
        ki = P'($urandom); #1;
        for (int p = 0; p < P; p++)
          if (ki[p]) check(word_ok(q[p], stored), $sformatf("port %0d value %h", p, stored));
          else       check(q[p] == '0, $sformatf("port %0d NULL", p));
      end
    end
    ki = '1; rst = 1; #1;
    check(q == '0, "rst forces NULL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
