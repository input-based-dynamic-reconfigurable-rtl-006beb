// tb_rab_top: end-to-end test of the top level at its default sizes.
// Drives both adders with a stream of operand pairs and DA settings and
// compares every result with the reference models. It also counts how
// often each mechanism of the design was exercised and fails if one never
// was:
//   exact     : all DA fields 0, sums equal to the integer sum
//   leaf      : some block with 1 <= DA < 8 (first-level cells approximate)
//   combiner  : some block with DA >= 2 (a propagate/generate combiner in
//               approximate mode)
//   full      : some block with DA >= 8 (whole block approximate)
//   ripple    : a carry of 1 passed from one 8-bit block into the next
//   lane_mix  : exact and approximate blocks in the same word
//   switch    : the DA of the 64-bit adder changed between two vectors
//   subtract  : a - b computed as a + ~b + 1 in exact mode
//   rca_exact / rca_approx : the RCA with DA 0 and with DA > 0
//   error     : an approximate result that differs from the exact sum
module tb_rab_top;
  logic [63:0] cla_a, cla_b, cla_s;
  logic        cla_cin, cla_pout, cla_gout, cla_cout;
  logic [31:0] cla_ctrl, prev_ctrl;
  logic [7:0]  rca_a, rca_b, rca_s;
  logic        rca_cin, rca_cout;
  logic [3:0]  rca_ctrl;
  int checks = 0, failures = 0;

  typedef enum int {M_EXACT, M_LEAF, M_COMB, M_FULL, M_RIPPLE, M_MIX, M_SWITCH,
                    M_SUB, M_RCA_EXACT, M_RCA_APPROX, M_ERROR, M_NUM} mech_e;
  int    seen [M_NUM];
  string mname [M_NUM] = '{"exact", "leaf", "combiner", "full", "ripple", "lane_mix",
                          "switch", "subtract", "rca_exact", "rca_approx", "error"};

  rab_top dut (
    .cla_a(cla_a), .cla_b(cla_b), .cla_cin(cla_cin), .cla_ctrl(cla_ctrl),
    .cla_s(cla_s), .cla_pout(cla_pout), .cla_gout(cla_gout), .cla_cout(cla_cout),
    .rca_a(rca_a), .rca_b(rca_b), .rca_cin(rca_cin), .rca_ctrl(rca_ctrl),
    .rca_s(rca_s), .rca_cout(rca_cout)
  );

  task automatic expect_eq(input logic [66:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

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
    logic [32:0] rr;
    bit          sub, any_exact, any_apx;
    int          da;
    foreach (seen[i]) seen[i] = 0;
    void'($urandom(11));
    prev_ctrl = '0;
    for (int n = 0; n < 20000; n++) begin
      // 64-bit adder: a DA setting that stays for a few vectors, then moves
      if (n % 4 == 0) begin
        case ($urandom_range(0, 3))
          0:       cla_ctrl = '0;
          1:       cla_ctrl = {8{4'($urandom_range(0, 15))}};
          default: cla_ctrl = $urandom();
        endcase
      end
      sub     = (cla_ctrl == 0) && ($urandom_range(0, 3) == 0);
      cla_a   = {$urandom(), $urandom()};
      cla_b   = (n % 6 == 5) ? ~cla_a : {$urandom(), $urandom()};
      cla_cin = 1'($urandom());
      if (sub) begin
        cla_b   = ~cla_b;     // present ~b: the adder then computes a - b
        cla_cin = 1'b1;
      end
      rca_a    = 8'($urandom());
      rca_b    = 8'($urandom());
      rca_cin  = 1'($urandom());
      rca_ctrl = 4'($urandom_range(0, 9));
      #1;

      rab_ref_pkg::ref_cla64(cla_a, cla_b, cla_cin, cla_ctrl, rs, rp, rg, rc, bc);
      expect_eq({cla_s, cla_pout, cla_gout, cla_cout}, {rs, rp, rg, rc}, "cla64");
      sum = 65'(cla_a) + 65'(cla_b) + 65'(cla_cin);
      if (cla_ctrl == 0) begin
        expect_eq({2'b0, cla_cout, cla_s}, {2'b0, sum}, "cla64 exact");
        seen[M_EXACT]++;
        if (sub) begin
          expect_eq({3'b0, cla_s}, {3'b0, cla_a - ~cla_b}, "cla64 subtract");
          seen[M_SUB]++;
        end
      end else if ({cla_cout, cla_s} != sum) seen[M_ERROR]++;
      any_exact = 0; any_apx = 0;
      for (int k = 0; k < 8; k++) begin
        da = int'(cla_ctrl[4*k +: 4]);
        if (da == 0) any_exact = 1; else any_apx = 1;
        if (da >= 1 && da < 8) seen[M_LEAF]++;
        if (da >= 2) seen[M_COMB]++;
        if (da >= 8) seen[M_FULL]++;
        if (k > 0 && bc[k]) seen[M_RIPPLE]++;
      end
      if (any_exact && any_apx) seen[M_MIX]++;
      if (cla_ctrl != prev_ctrl) seen[M_SWITCH]++;
      prev_ctrl = cla_ctrl;

      rr = rab_ref_pkg::ref_rca(32'(rca_a), 32'(rca_b), rca_cin, int'(rca_ctrl), 8);
      expect_eq({58'b0, rca_cout, rca_s}, {58'b0, rr[8:0]}, "rca");
      if (rca_ctrl == 0) begin
        expect_eq({58'b0, rca_cout, rca_s}, {58'b0, 9'(rca_a) + 9'(rca_b) + 9'(rca_cin)}, "rca exact");
        seen[M_RCA_EXACT]++;
      end else seen[M_RCA_APPROX]++;
    end
    foreach (seen[i]) begin
      $display("mechanism %-10s : %0d", mname[i], seen[i]);
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", mname[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
