// rab_cla8: 8-bit reconfigurable carry look-ahead adder (CLA).
//
// A tree CLA whose every cell has an exact and an approximate mode.
//   Level 1: one cell per bit. Even bits use rab_dmclb1, which also gives
//            the carry into the odd bit above it; odd bits use rab_dmclb2.
//   Level 2: four combiners over bit pairs. Pairs 1..0 and 5..4 use
//            rab_dmpgb1 and give the carries into bits 2 and 6.
//   Level 3: two combiners over nibbles. Nibble 3..0 (rab_dmpgb1) gives
//            the carry into bit 4.
//   Level 4: the root combiner over all 8 bits (rab_dmpgb1) gives cout and
//            the block's group propagate and generate (pout, gout).
// Carries: c1 from bit 0, c2 from pair 1..0, c3 from bit 2, c4 from nibble
// 3..0, c5 from bit 4, c6 from pair 5..4, c7 from bit 6, c8 = cout.
// rab_cla8_ctrl decodes the 4-bit degree of approximation ctrl into the 15
// selects. ctrl = 0 makes the block an exact adder; with ctrl = k the k
// least significant bits give s = b and the combiners whose whole fan-in is
// approximate switch too. The cell types, their equations and the fan-in
// rule follow the design; which bits use which cell type and the meaning of
// ctrl are this design's own reading. Combinational; no clock.
module rab_cla8
  import rab_pkg::*;
(
  input  logic [CLA_W-1:0]  a,
  input  logic [CLA_W-1:0]  b,
  input  logic              cin,
  input  logic [CTRL_W-1:0] ctrl,   // degree of approximation, 0 = exact
  output logic [CLA_W-1:0]  s,
  output logic              pout,   // group propagate of the block
  output logic              gout,   // group generate of the block
  output logic              cout
);

  cla8_app_t        app;
  logic [CLA_W-1:0] p, g;       // level-1 propagate / generate
  logic [CLA_W:0]   c;          // carry into each bit, c[8] = cout
  logic [3:0]       p2, g2;     // level-2 groups (bit pairs)
  logic [1:0]       p3, g3;     // level-3 groups (nibbles)

  rab_cla8_ctrl u_de (
    .ctrl (ctrl),
    .app  (app)
  );

  assign c[0] = cin;

  // Level 1: bit cells. Even bits produce the carry into the odd bit.
  for (genvar i = 0; i < CLA_W; i = i + 2) begin : g_bit
    rab_dmclb1 u_lo (
      .app  (app.leaf[i]),
      .a    (a[i]),
      .b    (b[i]),
      .cin  (c[i]),
      .p    (p[i]),
      .g    (g[i]),
      .s    (s[i]),
      .cout (c[i+1])
    );
    rab_dmclb2 u_hi (
      .app  (app.leaf[i+1]),
      .a    (a[i+1]),
      .b    (b[i+1]),
      .cin  (c[i+1]),
      .p    (p[i+1]),
      .g    (g[i+1]),
      .s    (s[i+1])
    );
  end

  // Level 2: bit pairs. Pairs 0 and 2 give the carries into bits 2 and 6.
  rab_dmpgb1 u_pg1 (
    .app (app.l2[0]), .pa (p[0]), .ga (g[0]), .pb (p[1]), .gb (g[1]),
    .cin (c[0]), .p (p2[0]), .g (g2[0]), .cout (c[2])
  );
  rab_dmpgb2 u_pg2 (
    .app (app.l2[1]), .pa (p[2]), .ga (g[2]), .pb (p[3]), .gb (g[3]),
    .p (p2[1]), .g (g2[1])
  );
  rab_dmpgb1 u_pg3 (
    .app (app.l2[2]), .pa (p[4]), .ga (g[4]), .pb (p[5]), .gb (g[5]),
    .cin (c[4]), .p (p2[2]), .g (g2[2]), .cout (c[6])
  );
  rab_dmpgb2 u_pg4 (
    .app (app.l2[3]), .pa (p[6]), .ga (g[6]), .pb (p[7]), .gb (g[7]),
    .p (p2[3]), .g (g2[3])
  );

  // Level 3: nibbles. The low nibble gives the carry into bit 4.
  rab_dmpgb1 u_pg5 (
    .app (app.l3[0]), .pa (p2[0]), .ga (g2[0]), .pb (p2[1]), .gb (g2[1]),
    .cin (c[0]), .p (p3[0]), .g (g3[0]), .cout (c[4])
  );
  rab_dmpgb2 u_pg6 (
    .app (app.l3[1]), .pa (p2[2]), .ga (g2[2]), .pb (p2[3]), .gb (g2[3]),
    .p (p3[1]), .g (g3[1])
  );

  // Level 4: root, carry out of the block.
  rab_dmpgb1 u_pg7 (
    .app (app.root), .pa (p3[0]), .ga (g3[0]), .pb (p3[1]), .gb (g3[1]),
    .cin (c[0]), .p (pout), .g (gout), .cout (c[8])
  );

  assign cout = c[8];

endmodule
