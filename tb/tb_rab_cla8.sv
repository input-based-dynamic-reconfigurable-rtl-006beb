// tb_rab_cla8: exhaustive check of the 8-bit reconfigurable CLA.
// All a, b, cin and ctrl values are applied (2^21 vectors). Every vector is
// compared with the level-by-level reference model; with ctrl = 0 the sum
// is also compared with the integer sum, pout with "all bits propagate"
// and gout with the carry out for cin = 0. With ctrl >= 8 the closed form
// s = b, cout = a[7] | b[0] cin, pout = b[0], gout = a[7] is checked too.
// The operand pair a = 8'hAF, b = 8'hDF is also checked exactly: s = 8'h8E,
// pout = 0, gout = 1, cout = 1.
module tb_rab_cla8;
  logic [7:0] a, b, s;
  logic       cin, pout, gout, cout;
  logic [3:0] ctrl;
  int checks = 0, failures = 0;

  rab_cla8 dut (.a(a), .b(b), .cin(cin), .ctrl(ctrl), .s(s), .pout(pout), .gout(gout), .cout(cout));

  task automatic expect_eq(input logic [10:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s ctrl=%0d a=%h b=%h cin=%0b got {s,p,g,c}=%h exp %h",
                 what, ctrl, a, b, cin, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] rs;
    logic       rp, rg, rc;
    logic [8:0] sum;
    for (int k = 0; k < 16; k++) begin
      for (int v = 0; v < (1 << 17); v++) begin
        {cin, a, b} = 17'(v);
        ctrl = 4'(k);
        #1;
        rab_ref_pkg::ref_cla8(a, b, cin, k, rs, rp, rg, rc);
        expect_eq({s, pout, gout, cout}, {rs, rp, rg, rc}, "model");
        if (k == 0) begin
          sum = 9'(a) + 9'(b) + 9'(cin);
          expect_eq({s, pout, gout, cout},
                    {sum[7:0], &(a ^ b), (9'(a) + 9'(b)) >> 8 != 0, sum[8]}, "exact");
        end
        if (k >= 8)
          expect_eq({s, pout, gout, cout}, {b, b[0], a[7], a[7] | (b[0] & cin)}, "full-approx");
      end
    end
    a = 8'hAF; b = 8'hDF; cin = 1'b0; ctrl = 4'd0;
    #1;
    expect_eq({s, pout, gout, cout}, {8'h8E, 1'b0, 1'b1, 1'b1}, "example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
