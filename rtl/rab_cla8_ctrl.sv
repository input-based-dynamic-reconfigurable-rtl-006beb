// rab_cla8_ctrl: approximation controller of the 8-bit reconfigurable CLA.
//
// Produces the 15 APP selects of one rab_cla8 block from its 4-bit degree
// of approximation (DA). The first-level cells follow the DA directly: the
// ctrl least significant bits are approximate (rab_da_decoder). A
// propagate/generate combiner may be approximate only when every block in
// its fan-in cone is approximate, so each combiner's select is the AND of
// the selects of its two children; the rule follows the design, and the
// thermometer meaning of ctrl is this design's own choice. With this coding
// ctrl = 2 also approximates the bits 1..0 combiner, ctrl = 4 the bits
// 3..0 combiner, and ctrl >= 8 the whole block, root included.
// Combinational.
module rab_cla8_ctrl
  import rab_pkg::*;
(
  input  logic [CTRL_W-1:0] ctrl,   // degree of approximation, 0 = exact
  output cla8_app_t         app     // selects, 1 = approximate
);

  logic [CLA_W-1:0] leaf_app;

  rab_da_decoder #(.W(CLA_W), .CTRL_W(CTRL_W)) u_dec (
    .ctrl (ctrl),
    .app  (leaf_app)
  );

  always_comb begin
    app.leaf = leaf_app;
    for (int j = 0; j < 4; j++) begin
      app.l2[j] = app.leaf[2*j] & app.leaf[2*j+1];
    end
    for (int j = 0; j < 2; j++) begin
      app.l3[j] = app.l2[2*j] & app.l2[2*j+1];
    end
    app.root = app.l3[0] & app.l3[1];
  end

endmodule
