// tb_rab_dmfa: exhaustive check of the dual-mode full adder.
// Exact mode is compared with the integer sum a + b + cin; approximate mode
// with s = b, cout = a. It also counts how many output bits of the
// approximate mode agree with the exact ones over all eight input patterns
// (10 of 16, i.e. more than half) and checks that count.
module tb_rab_dmfa;
  logic app, a, b, cin, s, cout;
  int   checks = 0, failures = 0, agree = 0;

  rab_dmfa dut (.app(app), .a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check(input logic got_s, got_c, exp_s, exp_c, input string what);
    checks++;
    if (got_s !== exp_s || got_c !== exp_c) begin
      failures++;
      $display("FAIL %s app=%0b a=%0b b=%0b cin=%0b: got s=%0b c=%0b exp s=%0b c=%0b",
               what, app, a, b, cin, got_s, got_c, exp_s, exp_c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] sum;
    for (int v = 0; v < 16; v++) begin
      {app, a, b, cin} = 4'(v);
      #1;
      sum = 2'(a) + 2'(b) + 2'(cin);
      if (!app) check(s, cout, sum[0], sum[1], "exact");
      else begin
        check(s, cout, b, a, "approx");
        agree += int'(s == sum[0]) + int'(cout == sum[1]);
      end
    end
    checks++;
    if (agree != 10) begin
      failures++;
      $display("FAIL approximate outputs agree on %0d of 16 bits, expected 10", agree);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
