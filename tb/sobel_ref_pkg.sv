// Reference arithmetic for the testbenches of the approximate Sobel edge
// detector. Every function works on plain integers and is written from the
// definition of the approximation (integer shifts and partial-product column
// counts), not from the RTL structure, so that the RTL can be checked against
// it. A depth of 0 gives the exact operation.
package sobel_ref_pkg;

  // lower-part-OR addition; returns the W+1-bit result (carry in bit W)
  function automatic int ref_add(int a, int b, int w, int k);
    int lo, c, hi;
    a &= (1 << w) - 1;
    b &= (1 << w) - 1;
    if (k == 0) return a + b;
    lo = (a | b) & ((1 << k) - 1);
    c  = (a >> (k - 1)) & (b >> (k - 1)) & 1;
    hi = (a >> k) + (b >> k) + c;
    return (hi << k) | lo;
  endfunction

  // XOR-low-part subtraction of unsigned w-bit values; returns the signed result
  function automatic int ref_sub(int a, int b, int w, int k);
    int hi;
    a &= (1 << w) - 1;
    b &= (1 << w) - 1;
    if (k == 0) return a - b;
    hi = (a >>> k) - (b >>> k) - ((((~a) >> (k - 1)) & (b >> (k - 1))) & 1);
    return hi * (1 << k) + ((a ^ b) & ((1 << k) - 1));
  endfunction

  // multiplier with carry-free low columns, product modulo 2**pw
  function automatic longint ref_mul(int a, int b, int aw, int bw, int pw, int k);
    longint acc = 0;
    for (int col = 0; col < aw + bw; col++) begin
      int ones = 0;
      for (int i = 0; i < bw; i++) begin
        int j = col - i;
        if (j >= 0 && j < aw) ones += ((a >> j) & 1) & ((b >> i) & 1);
      end
      if (col < k) acc += (ones > 0) ? (longint'(1) << col) : 0;
      else         acc += longint'(ones) << col;
    end
    return acc & ((longint'(1) << pw) - 1);
  endfunction

  // one gradient direction: sum_k w_k * (pa[k] - pb[k]), w = 1,2,1
  function automatic int ref_grad(int pa[3], int pb[3], int sk, int mk, int ak, output bit pos);
    int t[3];
    int m, s01, s;
    for (int k = 0; k < 3; k++) t[k] = ref_sub(pa[k], pb[k], 8, sk) & 'h7ff;
    m   = int'(ref_mul(t[1], 2, 11, 2, 11, mk));
    s01 = ref_add(t[0], m, 11, ak) & 'h7ff;
    s   = ref_add(s01, t[2], 11, ak) & 'h7ff;
    if (s >= 1024) s -= 2048;
    pos = (s >= 0);
    if (s < 0) s = -s;
    return (s > 1023) ? 1023 : s;
  endfunction

  // |Gx| + |Gy| of a window w[row][col]
  function automatic int ref_mag(int w[3][3], int sk, int mk, int ak, output bit px, output bit py);
    int xa[3], xb[3], ya[3], yb[3];
    int mx, my;
    for (int k = 0; k < 3; k++) begin
      xa[k] = w[k][2]; xb[k] = w[k][0];
      ya[k] = w[2][k]; yb[k] = w[0][k];
    end
    mx = ref_grad(xa, xb, sk, mk, ak, px);
    my = ref_grad(ya, yb, sk, mk, ak, py);
    return ref_add(mx, my, 11, ak) & 'h7ff;
  endfunction

  // exact Sobel magnitude |Gx| + |Gy|
  function automatic int exact_mag(int w[3][3]);
    int gx, gy;
    gx = (w[0][2] + 2 * w[1][2] + w[2][2]) - (w[0][0] + 2 * w[1][0] + w[2][0]);
    gy = (w[2][0] + 2 * w[2][1] + w[2][2]) - (w[0][0] + 2 * w[0][1] + w[0][2]);
    return (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
  endfunction

endpackage
