// rab_dmclb2: dual-mode first-level carry look-ahead block, no carry out.
//
// Same as rab_dmclb1 but for a bit whose carry out is produced by a
// combiner higher in the tree, so it has no cout. Exact mode (app = 0):
//   p = a ^ b, g = ab, s = p ^ cin.
// Approximate mode (app = 1): p = s = b, g = a. The equations of both modes
// follow the design. Combinational.
module rab_dmclb2
  import rab_pkg::*;
(
  input  logic app,    // MODE_APPROX (1) selects the approximate outputs
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic p,
  output logic g,
  output logic s
);

  logic p_x;

  always_comb begin
    p_x = a ^ b;
    if (app == MODE_APPROX) begin
      p = b;
      g = a;
      s = b;
    end else begin
      p = p_x;
      g = a & b;
      s = p_x ^ cin;
    end
  end

endmodule
