// tb_rab_dmpgb2: exhaustive check of a propagate/generate combiner.
// Exact mode: the joint group propagates only if both halves do, and
// generates if the upper half generates or the lower half generates and
// the upper propagates. Approximate mode: p = pa, g = gb.
module tb_rab_dmpgb2;
  logic app, pa, ga, pb, gb, cin, p, g, cout;
  int checks = 0, failures = 0;

  rab_dmpgb2 dut (.app(app), .pa(pa), .ga(ga), .pb(pb), .gb(gb), .p(p), .g(g));
  assign cout = 1'b0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ep, eg, ec, c_mid;
    for (int v = 0; v < 64; v++) begin
      {app, pa, ga, pb, gb, cin} = 6'(v);
      #1;
      if (app) begin
        ep = pa;
        eg = gb;
        ec = gb | (pa & cin);
      end else begin
        ep    = pa & pb;
        eg    = gb | (pb & ga);
        c_mid = ga | (pa & cin);     // carry out of the lower group
        ec    = gb | (pb & c_mid);   // carry out of the upper group
      end
      checks++;
      if ({p, g} !== {ep, eg} || (2 == 1 && cout !== ec)) begin
        failures++;
        $display("FAIL app=%0b pa=%0b ga=%0b pb=%0b gb=%0b cin=%0b got p=%0b g=%0b c=%0b",
                 app, pa, ga, pb, gb, cin, p, g, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
