// rab_dmclb1: dual-mode first-level carry look-ahead block with carry out.
//
// One bit of the carry look-ahead adder. It forms the bit's propagate and
// generate signals, its sum from the incoming carry, and the carry into the
// next bit. Exact mode (app = 0):
//   p = a ^ b, g = ab, s = p ^ cin, cout = g + p cin.
// Approximate mode (app = 1): p = s = b and g = cout = a, so operand b
// stands in for p and s and operand a for g and cout. The equations of both
// modes follow the design. Combinational.
module rab_dmclb1
  import rab_pkg::*;
(
  input  logic app,    // MODE_APPROX (1) selects the approximate outputs
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic p,
  output logic g,
  output logic s,
  output logic cout
);

  logic p_x, g_x;

  always_comb begin
    p_x = a ^ b;
    g_x = a & b;
    if (app == MODE_APPROX) begin
      p    = b;
      g    = a;
      s    = b;
      cout = a;
    end else begin
      p    = p_x;
      g    = g_x;
      s    = p_x ^ cin;
      cout = g_x | (p_x & cin);
    end
  end

endmodule
