// rab_pkg: types and constants shared by the reconfigurable adder blocks.
//
// A reconfigurable adder block (RAB) is an adder whose cells each have an
// exact and an approximate mode, chosen at run time by a one-bit APP select.
// The 8-bit carry look-ahead block is a binary tree of 8 first-level cells
// (one per bit) and 7 propagate/generate combiners. Its 15 APP selects are
// grouped in cla8_app_t, one field per tree level. The 4-bit ctrl word of a
// block is its degree of approximation (DA). The widths follow the 8-bit
// and 64-bit adders this design implements; the grouping of the selects
// into a struct and the enum names are this design's own.
package rab_pkg;

  // Width of one carry look-ahead block and of its DA control word.
  localparam int unsigned CLA_W      = 8;
  localparam int unsigned CTRL_W     = 4;
  // Number of 8-bit blocks in the 64-bit adder.
  localparam int unsigned CLA64_NBLK = 8;

  // Mode of a dual-mode cell: APP = 1 selects the approximate outputs.
  typedef enum logic {
    MODE_ACCURATE = 1'b0,
    MODE_APPROX   = 1'b1
  } rab_mode_e;

  // APP selects of one 8-bit CLA block.
  //   leaf[i] : first-level cell of bit i
  //   l2[j]   : combiner of bits 2j+1..2j
  //   l3[j]   : combiner of bits 4j+3..4j
  //   root    : combiner of bits 7..0
  typedef struct packed {
    logic       root;
    logic [1:0] l3;
    logic [3:0] l2;
    logic [7:0] leaf;
  } cla8_app_t;

endpackage
