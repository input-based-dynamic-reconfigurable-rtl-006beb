// tb_rab_cla8_ctrl: exhaustive check of the CLA approximation controller.
// For DA = ctrl, bit i is approximate when i < ctrl, and a combiner over
// bits hi..lo is approximate exactly when hi < ctrl (all its bits are).
module tb_rab_cla8_ctrl;
  import rab_pkg::*;
  logic [3:0] ctrl;
  cla8_app_t  app;
  int checks = 0, failures = 0;

  rab_cla8_ctrl dut (.ctrl(ctrl), .app(app));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cla8_app_t e;
    for (int v = 0; v < 16; v++) begin
      ctrl = 4'(v);
      #1;
      for (int i = 0; i < 8; i++) e.leaf[i] = (i < v);
      for (int j = 0; j < 4; j++) e.l2[j] = (2*j + 1 < v);
      for (int j = 0; j < 2; j++) e.l3[j] = (4*j + 3 < v);
      e.root = (7 < v);
      checks++;
      if (app !== e) begin
        failures++;
        $display("FAIL ctrl=%0d app=%b exp=%b", v, app, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
