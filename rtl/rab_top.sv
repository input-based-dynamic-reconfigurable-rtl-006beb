// rab_top: reconfigurable adder/subtractor blocks (RABs), top level.
//
// Two reconfigurable adders stand side by side, each with its own ports:
//   - the 64-bit reconfigurable carry look-ahead adder (rab_cla64), eight
//     8-bit tree-CLA blocks with chained carries, each block with a 4-bit
//     degree-of-approximation field in cla_ctrl;
//   - the reconfigurable ripple-carry adder (rab_rca) of RCA_W dual-mode
//     full adders with a single degree-of-approximation word rca_ctrl.
// A degree of approximation of 0 gives exact sums; larger values let more
// low-order bits relay operand b as their sum. The choice of that degree
// from the video being encoded is made outside this design and arrives on
// the ctrl inputs. Subtraction a - b is done by presenting ~b with a
// carry in of 1. Combinational throughout; no clock or reset.
module rab_top
  import rab_pkg::*;
#(
  parameter int unsigned NBLK   = CLA64_NBLK,     // 8-bit blocks in the CLA
  parameter int unsigned RCA_W  = 8,              // width of the RCA
  parameter int unsigned RCA_CW = $clog2(RCA_W + 1)
) (
  // 64-bit reconfigurable CLA
  input  logic [NBLK*CLA_W-1:0]  cla_a,
  input  logic [NBLK*CLA_W-1:0]  cla_b,
  input  logic                   cla_cin,
  input  logic [NBLK*CTRL_W-1:0] cla_ctrl,
  output logic [NBLK*CLA_W-1:0]  cla_s,
  output logic                   cla_pout,
  output logic                   cla_gout,
  output logic                   cla_cout,
  // reconfigurable RCA
  input  logic [RCA_W-1:0]       rca_a,
  input  logic [RCA_W-1:0]       rca_b,
  input  logic                   rca_cin,
  input  logic [RCA_CW-1:0]      rca_ctrl,
  output logic [RCA_W-1:0]       rca_s,
  output logic                   rca_cout
);

  rab_cla64 #(.NBLK(NBLK)) u_cla (
    .a    (cla_a),
    .b    (cla_b),
    .cin  (cla_cin),
    .ctrl (cla_ctrl),
    .s    (cla_s),
    .pout (cla_pout),
    .gout (cla_gout),
    .cout (cla_cout)
  );

  rab_rca #(.W(RCA_W), .CTRL_W(RCA_CW)) u_rca (
    .a    (rca_a),
    .b    (rca_b),
    .cin  (rca_cin),
    .ctrl (rca_ctrl),
    .s    (rca_s),
    .cout (rca_cout)
  );

endmodule
