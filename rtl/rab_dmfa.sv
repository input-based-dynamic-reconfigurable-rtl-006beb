// rab_dmfa: dual-mode full adder (DMFA).
//
// With app = 0 the cell is an ordinary full adder:
//   s = a ^ b ^ cin,  cout = ab + b cin + a cin.
// With app = 1 it relays its operands instead: s = b and cout = a. This
// approximation is right for more than half of the eight input patterns
// and needs no logic, only a 2:1 multiplexer on each output. In silicon the
// exact full adder is power-gated while app = 1; here it is simply left
// unselected. Both modes and their equations follow the design; the cell is
// purely combinational.
module rab_dmfa
  import rab_pkg::*;
(
  input  logic      app,   // MODE_APPROX (1) selects the approximate outputs
  input  logic      a,
  input  logic      b,
  input  logic      cin,
  output logic      s,
  output logic      cout
);

  logic s_exact, c_exact;

  always_comb begin
    s_exact = a ^ b ^ cin;
    c_exact = (a & b) | (b & cin) | (a & cin);
    if (app == MODE_APPROX) begin
      s    = b;
      cout = a;
    end else begin
      s    = s_exact;
      cout = c_exact;
    end
  end

endmodule
