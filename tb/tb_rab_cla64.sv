// tb_rab_cla64: random check of the 64-bit reconfigurable CLA.
// With all ctrl fields 0 the outputs are compared with the 65-bit integer
// sum, pout with "every bit propagates" and gout with the carry out for
// cin = 0. With random ctrl fields they are compared with the reference,
// which chains eight 8-bit block models through their carries. Operands
// with long carry chains (all-ones plus one) are mixed in.
module tb_rab_cla64;
  logic [63:0] a, b, s;
  logic        cin, pout, gout, cout;
  logic [31:0] ctrl;
  int checks = 0, failures = 0;

  rab_cla64 dut (.a(a), .b(b), .cin(cin), .ctrl(ctrl), .s(s), .pout(pout), .gout(gout), .cout(cout));

  task automatic expect_eq(input logic [66:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s ctrl=%h a=%h b=%h cin=%0b got %h exp %h", what, ctrl, a, b, cin, got, exp);
    end
  endtask

  function automatic logic [63:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] rs;
    logic        rp, rg, rc;
    logic [7:0]  bc;
    logic [64:0] sum;
    void'($urandom(7));
    for (int n = 0; n < 40000; n++) begin
      a    = rnd64();
      b    = (n % 5 == 1) ? ~a : rnd64();
      cin  = 1'($urandom());
      ctrl = (n % 2 == 0) ? 32'd0 : $urandom();
      if (n % 7 == 3) ctrl = {8{4'($urandom_range(0, 15))}};
      #1;
      rab_ref_pkg::ref_cla64(a, b, cin, ctrl, rs, rp, rg, rc, bc);
      expect_eq({s, pout, gout, cout}, {rs, rp, rg, rc}, "model");
      if (ctrl == 0) begin
        sum = 65'(a) + 65'(b) + 65'(cin);
        expect_eq({s, pout, gout, cout},
                  {sum[63:0], &(a ^ b), ((65'(a) + 65'(b)) >> 64) != 0, sum[64]}, "exact");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
