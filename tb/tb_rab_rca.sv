// tb_rab_rca: exhaustive check of the 8-bit reconfigurable RCA.
// Every a, b, cin and ctrl value is applied. ctrl = 0 is compared with the
// integer sum; every ctrl with the reference: the ctrl low bits copy b, the
// carry into the first exact bit is a of the bit below, the rest adds.
// A 16-bit instance (the width used for the power figures of the DMFA) is
// then checked the same way with random operands.
module tb_rab_rca;
  localparam int W = 8;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  logic [3:0]   ctrl;
  int checks = 0, failures = 0;

  rab_rca #(.W(W)) dut (.a(a), .b(b), .cin(cin), .ctrl(ctrl), .s(s), .cout(cout));

  logic [15:0] a16, b16, s16;
  logic        cin16, cout16;
  logic [4:0]  ctrl16;
  rab_rca #(.W(16)) dut16 (.a(a16), .b(b16), .cin(cin16), .ctrl(ctrl16), .s(s16), .cout(cout16));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] r;
    logic [W:0]  sum;
    for (int k = 0; k < 16; k++) begin
      for (int v = 0; v < (1 << (2*W+1)); v++) begin
        {cin, a, b} = (2*W+1)'(v);
        ctrl = 4'(k);
        #1;
        r = rab_ref_pkg::ref_rca(32'(a), 32'(b), cin, k, W);
        checks++;
        if ({cout, s} !== r[W:0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL ctrl=%0d a=%h b=%h cin=%0b got %h exp %h", k, a, b, cin, {cout, s}, r[W:0]);
        end
        if (k == 0) begin
          sum = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
          checks++;
          if ({cout, s} !== sum) begin
            failures++;
            if (failures < 10) $display("FAIL exact a=%h b=%h got %h exp %h", a, b, {cout, s}, sum);
          end
        end
      end
    end
    for (int n = 0; n < 100000; n++) begin
      a16    = 16'($urandom());
      b16    = (n % 4 == 1) ? ~a16 : 16'($urandom());
      cin16  = 1'($urandom());
      ctrl16 = (n % 3 == 0) ? 5'd0 : 5'($urandom_range(0, 31));
      #1;
      r = rab_ref_pkg::ref_rca(32'(a16), 32'(b16), cin16, int'(ctrl16), 16);
      checks++;
      if ({cout16, s16} !== r[16:0]) begin
        failures++;
        if (failures < 10)
          $display("FAIL W=16 ctrl=%0d a=%h b=%h cin=%0b got %h exp %h", ctrl16, a16, b16, cin16, {cout16, s16}, r[16:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
