// Reference model for the testbenches: the approximate 8x8 multiplier
// computed bit by bit on queues of dots, column by column, following the
// same two-stage layout as the hardware but written without any of its
// modules. Also holds exact error totals over all 65536 operand pairs,
// obtained from an independent model of the same layout.
package approx_ref_pkg;

  typedef bit dotq_t[$];

  // Exact 4-2 compressor: returns {cout, carry, sum}.
  function automatic bit [2:0] ex42(bit a, bit b, bit c, bit d, bit z);
    int t;
    t = int'(a) + int'(b) + int'(c) + int'(d) + int'(z);  // total weight in units of 2^i
    // sum = parity; cout = majority(a,b,c) style carry that ignores z;
    // carry takes the rest.
    ex42[0] = t[0];
    ex42[2] = ((a ^ b) ? c : a);
    ex42[1] = ((t - int'(ex42[0])) / 2) - int'(ex42[2]);
  endfunction

  function automatic bit [1:0] ap42(bit a, bit b, bit c, bit d, bit neg);
    ap42[0] = a | b | c | d;
    if (neg) ap42[1] = (a & b) | (c & d);
    else     ap42[1] = (b & (a | c | d)) | (c & d);
  endfunction

  function automatic int unsigned ref_mult(int unsigned x, int unsigned y,
                                           int unsigned w, bit neg);
    dotq_t col[17];
    dotq_t s1[17];
    dotq_t s2[17];
    bit z;
    bit [2:0] e;
    bit [1:0] p;
    int unsigned res;
    for (int n = 0; n < 8; n++)
      for (int m = 0; m < 8; m++)
        col[m+n].push_back(x[m] & y[n]);
    // one compressor site at column i, inputs q[k..k+3], carry-in zi
    // results appended; returns carry-out
    for (int i = 0; i < 4; i++) s1[i] = col[i];
    // col 4: half adder on the first two, rest passes
    s1[4].push_back(col[4][0] ^ col[4][1]);  s1[5].push_back(col[4][0] & col[4][1]);
    for (int j = 2; j < 5; j++) s1[4].push_back(col[4][j]);
    // col 5
    p = ap42(col[5][0], col[5][1], col[5][2], col[5][3], neg);
    s1[5].push_back(p[0]); s1[6].push_back(p[1]);
    s1[5].push_back(col[5][4]); s1[5].push_back(col[5][5]);
    // col 6
    p = ap42(col[6][0], col[6][1], col[6][2], col[6][3], neg);
    s1[6].push_back(p[0]); s1[7].push_back(p[1]);
    s1[6].push_back(col[6][4] ^ col[6][5]); s1[7].push_back(col[6][4] & col[6][5]);
    s1[6].push_back(col[6][6]);
    // col 7: two compressors
    for (int k = 0; k < 8; k += 4) begin
      p = ap42(col[7][k], col[7][k+1], col[7][k+2], col[7][k+3], neg);
      s1[7].push_back(p[0]); s1[8].push_back(p[1]);
    end
    // cols 8..10 compressors with a carry chain, plus adders
    z = 0;
    for (int i = 8; i <= 10; i++) begin
      if (i < w) begin
        p = ap42(col[i][0], col[i][1], col[i][2], col[i][3], neg);
        s1[i].push_back(p[0]); s1[i+1].push_back(p[1]); z = 0;
      end else begin
        e = ex42(col[i][0], col[i][1], col[i][2], col[i][3], z);
        s1[i].push_back(e[0]); s1[i+1].push_back(e[1]); z = e[2];
      end
      if (i == 8) begin
        int t; t = int'(col[8][4]) + int'(col[8][5]) + int'(col[8][6]);
        s1[8].push_back(t[0]); s1[9].push_back(t[1]);
      end else if (i == 9) begin
        s1[9].push_back(col[9][4] ^ col[9][5]); s1[10].push_back(col[9][4] & col[9][5]);
      end else begin
        s1[10].push_back(col[10][4]);
      end
    end
    begin
      int t; t = int'(col[11][0]) + int'(col[11][1]) + int'(z);
      s1[11].push_back(t[0]); s1[12].push_back(t[1]);
    end
    s1[11].push_back(col[11][2]); s1[11].push_back(col[11][3]);
    for (int i = 12; i < 15; i++) foreach (col[i][j]) s1[i].push_back(col[i][j]);
    // stage 2
    s2[0] = s1[0]; s2[1] = s1[1];
    s2[2].push_back(s1[2][0] ^ s1[2][1]); s2[3].push_back(s1[2][0] & s1[2][1]);
    s2[2].push_back(s1[2][2]);
    z = 0;
    for (int i = 3; i <= 12; i++) begin
      if (i < w) begin
        p = ap42(s1[i][0], s1[i][1], s1[i][2], s1[i][3], neg);
        s2[i].push_back(p[0]); s2[i+1].push_back(p[1]); z = 0;
      end else begin
        e = ex42(s1[i][0], s1[i][1], s1[i][2], s1[i][3], z);
        s2[i].push_back(e[0]); s2[i+1].push_back(e[1]); z = e[2];
      end
    end
    begin
      int t; t = int'(s1[13][0]) + int'(s1[13][1]) + int'(z);
      s2[13].push_back(t[0]); s2[14].push_back(t[1]);
    end
    s2[14].push_back(s1[14][0]);
    res = 0;
    for (int i = 0; i < 17; i++) begin
      if (s2[i].size() > 2) $fatal(1, "reference tree overflow in column %0d", i);
      foreach (s2[i][j]) res += int'(s2[i][j]) << i;
    end
    return res;
  endfunction

  // Sum of (approximate - exact) over all 65536 operand pairs.
  localparam longint ERR_SUM_PM_W8  = 64'sd5580032;
  localparam longint ERR_SUM_NM_W8  = -64'sd577408;
  localparam longint ERR_SUM_PM_W16 = 64'sd59617536;
  localparam longint ERR_SUM_NM_W16 = -64'sd23771008;

endpackage
