// rab_ref_pkg: reference models used by the testbenches.
//
// The models are written from the cell equations and the approximation
// rule, not from the RTL structure: group signals are formed level by level
// over aligned power-of-two bit ranges, a range is approximate exactly when
// all of its bits lie below the degree of approximation, and the carry into
// an even bit i comes from the range of size lowbit(i) that ends at bit i-1.
package rab_ref_pkg;

  // Reference for one 8-bit reconfigurable CLA block with DA k.
  function automatic void ref_cla8(
    input  logic [7:0] a,
    input  logic [7:0] b,
    input  logic       cin,
    input  int         k,
    output logic [7:0] s,
    output logic       pout,
    output logic       gout,
    output logic       cout
  );
    logic       gp [4][8];   // propagate of range [j*2^l, (j+1)*2^l - 1]
    logic       gg [4][8];   // generate of the same range
    logic [8:0] c;
    int         size, lo, lvl;
    for (int i = 0; i < 8; i++) begin
      if (i < k) begin gp[0][i] = b[i]; gg[0][i] = a[i]; end
      else       begin gp[0][i] = a[i] ^ b[i]; gg[0][i] = a[i] & b[i]; end
    end
    for (int l = 1; l < 4; l++) begin
      for (int j = 0; j < (8 >> l); j++) begin
        // the range ends at bit (j+1)*2^l - 1; approximate if below k
        if (((j + 1) << l) - 1 < k) begin
          gp[l][j] = gp[l-1][2*j];
          gg[l][j] = gg[l-1][2*j+1];
        end else begin
          gp[l][j] = gp[l-1][2*j] & gp[l-1][2*j+1];
          gg[l][j] = gg[l-1][2*j+1] | (gg[l-1][2*j] & gp[l-1][2*j+1]);
        end
      end
    end
    c[0] = cin;
    for (int i = 1; i <= 8; i++) begin
      if (i % 2 == 1) begin
        c[i] = (i - 1 < k) ? a[i-1] : ((a[i-1] & b[i-1]) | ((a[i-1] ^ b[i-1]) & c[i-1]));
      end else begin
        size = i & (-i);
        lo   = i - size;
        lvl  = $clog2(size);
        c[i] = gg[lvl][lo/size] | (gp[lvl][lo/size] & c[lo]);
      end
    end
    for (int i = 0; i < 8; i++) s[i] = (i < k) ? b[i] : (a[i] ^ b[i] ^ c[i]);
    pout = gp[3][0];
    gout = gg[3][0];
    cout = c[8];
  endfunction

  // Reference for the 64-bit adder: blocks chained by their carries.
  function automatic void ref_cla64(
    input  logic [63:0] a,
    input  logic [63:0] b,
    input  logic        cin,
    input  logic [31:0] ctrl,
    output logic [63:0] s,
    output logic        pout,
    output logic        gout,
    output logic        cout,
    output logic [7:0]  blk_cin
  );
    logic [7:0] sb;
    logic       bp, bg, c;
    c    = cin;
    pout = 1'b1;
    gout = 1'b0;
    for (int k = 0; k < 8; k++) begin
      blk_cin[k] = c;
      ref_cla8(a[8*k +: 8], b[8*k +: 8], c, int'(ctrl[4*k +: 4]), sb, bp, bg, c);
      s[8*k +: 8] = sb;
      pout = pout & bp;
      gout = bg | (bp & gout);
    end
    cout = c;
  endfunction

  // Reference for a W-bit reconfigurable RCA (W <= 32) with DA k: the k
  // low bits give s = b, the carry into bit k is a[k-1], the rest add.
  function automatic logic [32:0] ref_rca(
    input logic [31:0] a,
    input logic [31:0] b,
    input logic        cin,
    input int          k,
    input int          w
  );
    logic [32:0] r;      // {cout, s}
    logic [32:0] hi;
    logic        c;
    if (k >= w) begin
      r = 33'(b) | (33'(a[w-1]) << w);
    end else begin
      c  = (k == 0) ? cin : a[k-1];
      hi = 33'(a >> k) + 33'(b >> k) + 33'(c);
      r  = (hi << k) | 33'(b & ((32'd1 << k) - 1));
      r  = r & ((33'd1 << (w + 1)) - 1);
    end
    return r;
  endfunction

endpackage
