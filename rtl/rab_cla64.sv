// rab_cla64: 64-bit reconfigurable carry look-ahead adder.
//
// NBLK 8-bit reconfigurable CLA blocks (rab_cla8) side by side; the carry
// out of block k is the carry into block k+1, so the look-ahead works
// inside a block and the carry ripples from block to block. Each block has
// its own 4-bit degree-of-approximation field, ctrl[4k+3:4k], so the amount
// of approximation can be set per byte lane of the word (0 = exact,
// 8 or more = whole byte approximate). pout and gout are the propagate and
// generate of the whole word, formed from the blocks' group signals:
// pout is the AND of all block propagates and gout is built up block by
// block as g_k + p_k gout_below. Eight blocks with chained carries follow
// the design; the per-block ctrl fields and the word-level pout/gout are
// this design's own reading. Combinational; no clock.
module rab_cla64
  import rab_pkg::*;
#(
  parameter int unsigned NBLK = CLA64_NBLK   // number of 8-bit blocks
) (
  input  logic [NBLK*CLA_W-1:0]  a,
  input  logic [NBLK*CLA_W-1:0]  b,
  input  logic                   cin,
  input  logic [NBLK*CTRL_W-1:0] ctrl,   // DA of block k in bits 4k+3..4k
  output logic [NBLK*CLA_W-1:0]  s,
  output logic                   pout,   // propagate of the whole word
  output logic                   gout,   // generate of the whole word
  output logic                   cout
);

  logic [NBLK:0]   c;         // c[k] = carry into block k
  logic [NBLK-1:0] bp, bg;    // group propagate / generate of each block

  assign c[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    rab_cla8 u_blk (
      .a    (a[k*CLA_W +: CLA_W]),
      .b    (b[k*CLA_W +: CLA_W]),
      .cin  (c[k]),
      .ctrl (ctrl[k*CTRL_W +: CTRL_W]),
      .s    (s[k*CLA_W +: CLA_W]),
      .pout (bp[k]),
      .gout (bg[k]),
      .cout (c[k+1])
    );
  end

  assign cout = c[NBLK];

  always_comb begin
    pout = &bp;
    gout = 1'b0;
    for (int k = 0; k < int'(NBLK); k++) begin
      gout = bg[k] | (bp[k] & gout);
    end
  end

endmodule
