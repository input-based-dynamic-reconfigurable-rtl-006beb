// tb_rab_dmclb: exhaustive check of the first-level CLA cell with carry out.
// Exact mode: p = a ^ b, g = ab, and {cout, s} must equal a + b + cin.
// Approximate mode: p = s = b and g = cout = a.
module tb_rab_dmclb;
  logic app, a, b, cin, p, g, s, cout;
  int checks = 0, failures = 0;

  rab_dmclb1 dut (.app(app), .a(a), .b(b), .cin(cin), .p(p), .g(g), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] sum;
    logic [3:0] exp_v;
    for (int v = 0; v < 16; v++) begin
      {app, a, b, cin} = 4'(v);
      #1;
      sum   = 2'(a) + 2'(b) + 2'(cin);
      exp_v = app ? {b, a, b, a} : {a ^ b, a & b, sum[0], sum[1]};
      checks++;
      if ({p, g, s, cout} !== exp_v) begin
        failures++;
        $display("FAIL app=%0b a=%0b b=%0b cin=%0b got pgsc=%b exp %b", app, a, b, cin, {p, g, s, cout}, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
