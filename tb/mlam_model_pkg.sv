// mlam_model_pkg: reference models for the testbenches of the approximate
// multiplier. Written as a bit-level simulation of the reduction rule with
// column lists and counts, independently of the structural netlist in the RTL.
//
// Rule being modelled, per stage, columns from least significant up: groups of
// six bits -> approximate 6:3 count (popcount minus one when both halves have odd
// parity); groups of three -> full adder; two bits left of a column that held more
// than two -> half adder; the rest passes. Outputs are appended to the next
// stage's columns in creation order. Stop when no column holds more than two bits.
package mlam_model_pkg;

  localparam int NCOL = 16;
  localparam int MAXH = 64;

  function automatic int unsigned approx63(input logic [5:0] x);
    int unsigned v;
    v = $countones(x);
    if ((^x[2:0]) && (^x[5:3])) v = v - 1;
    return v;
  endfunction

  // Value represented by the two rows the reduction ends with.
  function automatic int unsigned ppr_value(input logic [7:0][7:0] pp);
    logic col  [NCOL][MAXH];
    logic nxt  [NCOL][MAXH];
    int   h    [NCOL];
    int   nh   [NCOL];
    int   maxh, p;
    int unsigned v, total;
    logic [5:0] g;
    for (int c = 0; c < NCOL; c++) begin
      h[c] = 0;
      for (int i = 0; i < 8; i++)
        if (c - i >= 0 && c - i < 8) begin
          col[c][h[c]] = pp[i][c-i];
          h[c]++;
        end
    end
    maxh = 8;
    while (maxh > 2) begin
      for (int c = 0; c < NCOL; c++) nh[c] = 0;
      for (int c = 0; c < NCOL; c++) begin
        p = 0;
        while (h[c] - p >= 6 && c + 2 < NCOL) begin
          for (int k = 0; k < 6; k++) g[k] = col[c][p+k];
          v = approx63(g);
          nxt[c][nh[c]] = v[0];     nh[c]++;
          nxt[c+1][nh[c+1]] = v[1]; nh[c+1]++;
          nxt[c+2][nh[c+2]] = v[2]; nh[c+2]++;
          p += 6;
        end
        while (h[c] - p >= 3 && c + 1 < NCOL) begin
          v = 32'(col[c][p]) + 32'(col[c][p+1]) + 32'(col[c][p+2]);
          nxt[c][nh[c]] = v[0];     nh[c]++;
          nxt[c+1][nh[c+1]] = v[1]; nh[c+1]++;
          p += 3;
        end
        if (h[c] > 2 && h[c] - p == 2 && c + 1 < NCOL) begin
          v = 32'(col[c][p]) + 32'(col[c][p+1]);
          nxt[c][nh[c]] = v[0];     nh[c]++;
          nxt[c+1][nh[c+1]] = v[1]; nh[c+1]++;
          p += 2;
        end
        while (p < h[c]) begin
          nxt[c][nh[c]] = col[c][p]; nh[c]++;
          p++;
        end
      end
      maxh = 0;
      for (int c = 0; c < NCOL; c++) begin
        h[c] = nh[c];
        if (h[c] > maxh) maxh = h[c];
        for (int k = 0; k < nh[c]; k++) col[c][k] = nxt[c][k];
      end
    end
    total = 0;
    for (int c = 0; c < NCOL; c++)
      for (int k = 0; k < h[c]; k++)
        if (col[c][k]) total += (32'd1 << c);
    return total;
  endfunction

  function automatic logic [7:0][7:0] partial_products(input logic [7:0] a, input logic [7:0] b);
    logic [7:0][7:0] pp;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        pp[i][j] = a[j] & b[i];
    return pp;
  endfunction

  function automatic int unsigned approx_product(input logic [7:0] a, input logic [7:0] b);
    return ppr_value(partial_products(a, b)) & 32'hFFFF;
  endfunction

endpackage
