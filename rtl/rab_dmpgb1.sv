// rab_dmpgb1: dual-mode propagate/generate block with carry out.
//
// Combines the group signals of a lower group (pa, ga) and the adjacent
// upper group (pb, gb) into those of the joint group, and gives the carry
// out of the joint group from the carry into it. Exact mode (app = 0):
//   p = pa pb, g = gb + ga pb.
// Approximate mode (app = 1): p = pa, g = gb.
// In both modes cout = g + p cin, using the p and g of the selected mode.
// The equations follow the design. Combinational.
module rab_dmpgb1
  import rab_pkg::*;
(
  input  logic app,    // MODE_APPROX (1) selects the approximate outputs
  input  logic pa,     // propagate of the lower group
  input  logic ga,     // generate of the lower group
  input  logic pb,     // propagate of the upper group
  input  logic gb,     // generate of the upper group
  input  logic cin,    // carry into the lower group
  output logic p,
  output logic g,
  output logic cout    // carry out of the upper group
);

  always_comb begin
    if (app == MODE_APPROX) begin
      p = pa;
      g = gb;
    end else begin
      p = pa & pb;
      g = gb | (ga & pb);
    end
    cout = g | (p & cin);
  end

endmodule
