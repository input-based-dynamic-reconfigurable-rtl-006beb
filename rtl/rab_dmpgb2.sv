// rab_dmpgb2: dual-mode propagate/generate block, no carry out.
//
// Combines the group signals of a lower group (pa, ga) and the adjacent
// upper group (pb, gb) into those of the joint group, for a place in the
// tree where no carry needs to be produced. Exact mode (app = 0):
//   p = pa pb, g = gb + ga pb.
// Approximate mode (app = 1): p = pa, g = gb.
// The equations follow the design. Combinational.
module rab_dmpgb2
  import rab_pkg::*;
(
  input  logic app,    // MODE_APPROX (1) selects the approximate outputs
  input  logic pa,     // propagate of the lower group
  input  logic ga,     // generate of the lower group
  input  logic pb,     // propagate of the upper group
  input  logic gb,     // generate of the upper group
  output logic p,
  output logic g
);

  always_comb begin
    if (app == MODE_APPROX) begin
      p = pa;
      g = gb;
    end else begin
      p = pa & pb;
      g = gb | (ga & pb);
    end
  end

endmodule
