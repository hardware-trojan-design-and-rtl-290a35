// tb_ncl_mux_ic: checks the input-complete multiplexer (W = 4). Each round
// presents s, a and b one at a time in a random order; the output must stay
// NULL until the last of them is DATA, then equal b when s is DATA1 and a when
// s is DATA0; the three are then removed in a random order and the output
// must stay DATA until the last is NULL.
module tb_ncl_mux_ic;
  import ncl_pkg::*;

  localparam int unsigned W = 4;
  int checks = 0, failures = 0;
  dr_t [W-1:0] a, b, f, av, bv;
  dr_t         s;
  logic        sb;

  ncl_mux_ic #(.W(W)) dut (.a(a), .b(b), .s(s), .f(f));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input int which, input logic on);
    case (which)
      0: s = on ? dr_enc(sb) : DR_NULL;
      1: a = on ? av : '0;
      default: b = on ? bv : '0;
    endcase
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int o [3];
    a = '0; b = '0; s = DR_NULL; #1;
    check(f == '0, "initial NULL");
    for (int it = 0; it < 300; it++) begin
      for (int i = 0; i < W; i++) begin
        av[i] = dr_enc(1'($urandom));
        bv[i] = dr_enc(1'($urandom));
      end
      sb = 1'($urandom);
      o[0] = $urandom_range(0, 2);
      o[1] = (o[0] + 1 + $urandom_range(0, 1)) % 3;
      o[2] = 3 - o[0] - o[1];
      put(o[0], 1); #1; check(f == '0, "waits (1 of 3)");
      put(o[1], 1); #1; check(f == '0, "waits (2 of 3)");
      put(o[2], 1); #1; check(f == (sb ? bv : av), $sformatf("select %b", sb));
      o[0] = $urandom_range(0, 2);
      o[1] = (o[0] + 1 + $urandom_range(0, 1)) % 3;
      o[2] = 3 - o[0] - o[1];
      put(o[0], 0); #1; check(f == (sb ? bv : av), "held (1 of 3 NULL)");
      put(o[1], 0); #1; check(f == (sb ? bv : av), "held (2 of 3 NULL)");
      put(o[2], 0); #1; check(f == '0, "NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
