// rab_rca: reconfigurable ripple-carry adder (RCA) built from DMFA cells.
//
// W dual-mode full adders are chained carry to carry, as in a plain
// ripple-carry adder. An approximation controller (rab_da_decoder) turns
// the DA word ctrl into one APP select per cell: the ctrl least significant
// cells relay their operands (s = b, carry out = a) and the others add
// exactly. ctrl = 0 gives an exact adder, ctrl >= W gives s = b with
// cout = a[W-1]. The cell chain and the controller follow the design; the
// thermometer meaning of ctrl is this design's own choice. Combinational:
// s and cout follow a, b, cin and ctrl with no clock.
module rab_rca #(
  parameter int unsigned W      = 8,               // adder width
  parameter int unsigned CTRL_W = $clog2(W + 1)    // width of the DA word
) (
  input  logic [W-1:0]      a,
  input  logic [W-1:0]      b,
  input  logic              cin,
  input  logic [CTRL_W-1:0] ctrl,   // degree of approximation, 0 = exact
  output logic [W-1:0]      s,
  output logic              cout
);

  logic [W-1:0] app;
  logic [W:0]   c;

  rab_da_decoder #(.W(W), .CTRL_W(CTRL_W)) u_dec (
    .ctrl (ctrl),
    .app  (app)
  );

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    rab_dmfa u_fa (
      .app  (app[i]),
      .a    (a[i]),
      .b    (b[i]),
      .cin  (c[i]),
      .s    (s[i]),
      .cout (c[i+1])
    );
  end

  assign cout = c[W];

endmodule
