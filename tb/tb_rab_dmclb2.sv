// tb_rab_dmclb2: exhaustive check of the first-level CLA cell without
// carry out. Exact mode: p = a ^ b, g = ab, s = low bit of a + b + cin.
// Approximate mode: p = s = b and g = a.
module tb_rab_dmclb2;
  logic app, a, b, cin, p, g, s;
  int checks = 0, failures = 0;

  rab_dmclb2 dut (.app(app), .a(a), .b(b), .cin(cin), .p(p), .g(g), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] sum;
    logic [2:0] exp_v;
    for (int v = 0; v < 16; v++) begin
      {app, a, b, cin} = 4'(v);
      #1;
      sum   = 2'(a) + 2'(b) + 2'(cin);
      exp_v = app ? {b, a, b} : {a ^ b, a & b, sum[0]};
      checks++;
      if ({p, g, s} !== exp_v) begin
        failures++;
        $display("FAIL app=%0b a=%0b b=%0b cin=%0b got pgs=%b exp %b", app, a, b, cin, {p, g, s}, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
