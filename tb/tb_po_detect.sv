// tb_po_detect: illegal-state Trojan detection by exhaustive proof
// obligations, run on the gate-level cells of the design.
//
// For every threshold gate g of a cell two questions are asked:
//   PO1: can some combination of NULL/DATA0/DATA1 inputs assert g?
//   PO2: can some combination of NULL/DATA0/DATA1/ILLEGAL inputs assert g?
// A gate for which PO1 is false and PO2 true is a potential Trojan. The cells
// have at most three dual-rail inputs, so all 4^3 input states are simply
// applied, each starting from the all-NULL state. Expected result: only the
// TH22 trigger of trojan_th22 is flagged. The variant for circuits whose
// gates idle at 1 (asking for g = 0 instead of g = 1) is applied to the
// Boolean NAND select of trojan_nand and must flag it.
module tb_po_detect;
  import ncl_pkg::*;

  int checks = 0, failures = 0;
  dr_t x, y, z3;
  dr_t and_z, xor_z, ha_s, ha_c, fa_s, fa_c, t22_bp, tn_bp;

  ncl_and     u_and (.x(x), .y(y), .z(and_z));
  ncl_xor     u_xor (.x(x), .y(y), .z(xor_z));
  ncl_ha      u_ha  (.x(x), .y(y), .s(ha_s), .cout(ha_c));
  ncl_fa      u_fa  (.x(x), .y(y), .ci(z3), .s(fa_s), .cout(fa_c));
  trojan_th22 u_t22 (.b(x), .k(y), .s(z3), .bp(t22_bp));
  trojan_nand u_tn  (.b(x), .k(y), .s(z3), .bp(tn_bp));

  localparam int NG = 16;
  logic [NG-1:0] g;
  string names [NG] = '{"and.z0", "and.z1",
                        "xor.t00", "xor.t01", "xor.z0", "xor.z1",
                        "ha.s0", "ha.s1", "ha.c0", "ha.c1",
                        "fa.c0", "fa.c1", "fa.s0", "fa.s1",
                        "th22.trigger", "nand.select(g=0)"};

  assign g = {~u_tn.sel, u_t22.sel,
              u_fa.s.r1, u_fa.s.r0, u_fa.cout.r1, u_fa.cout.r0,
              u_ha.cout.r1, u_ha.cout.r0, u_ha.s.r1, u_ha.s.r0,
              u_xor.z.r1, u_xor.z.r0, u_xor.t01, u_xor.t00,
              u_and.z.r1, u_and.z.r0};

  logic [NG-1:0] po1, po2, expect_flag;
  dr_t vals [4] = '{DR_NULL, DR_DATA0, DR_DATA1, DR_ILLEGAL};

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
    po1 = '0; po2 = '0;
    expect_flag = '0;
    expect_flag[14] = 1'b1;
    expect_flag[15] = 1'b1;
    x = DR_NULL; y = DR_NULL; z3 = DR_NULL; #1;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        for (int k = 0; k < 4; k++) begin
          x = vals[i]; y = vals[j]; z3 = vals[k]; #1;
          if (i != 3 && j != 3 && k != 3) po1 |= g;
          po2 |= g;
          x = DR_NULL; y = DR_NULL; z3 = DR_NULL; #1;
        end
    for (int n = 0; n < NG; n++) begin
      logic flag;
      flag = !po1[n] && po2[n];
      if (flag) $display("flagged as potential Trojan: %s", names[n]);
      check(flag == expect_flag[n], $sformatf("%s: PO1=%b PO2=%b", names[n], po1[n], po2[n]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
