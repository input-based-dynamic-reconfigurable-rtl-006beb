// tb_rab_da_decoder: exhaustive check of the DA decoder at two widths.
// For every ctrl value the select vector must hold ones in exactly the
// min(ctrl, W) lowest positions.
module tb_rab_da_decoder;
  logic [3:0] ctrl;
  logic [7:0] app8;
  logic [4:0] app5;
  int checks = 0, failures = 0;

  rab_da_decoder #(.W(8), .CTRL_W(4)) dut8 (.ctrl(ctrl), .app(app8));
  rab_da_decoder #(.W(5), .CTRL_W(4)) dut5 (.ctrl(ctrl), .app(app5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e8;
    logic [4:0] e5;
    for (int v = 0; v < 16; v++) begin
      ctrl = 4'(v);
      #1;
      e8 = (v >= 8) ? 8'hFF : 8'((1 << v) - 1);
      e5 = (v >= 5) ? 5'h1F : 5'((1 << v) - 1);
      checks += 2;
      if (app8 !== e8) begin failures++; $display("FAIL W=8 ctrl=%0d app=%b exp=%b", v, app8, e8); end
      if (app5 !== e5) begin failures++; $display("FAIL W=5 ctrl=%0d app=%b exp=%b", v, app5, e5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
