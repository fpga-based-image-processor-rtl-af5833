// tb_vcc_ref_pkg -- reference models used by the testbenches to work out the
// expected results independently of the RTL: vector coding of an intensity
// image, correlation of a template against a partial image, and the number
// of ones in a code.
//
// Images are int arrays in raster order (index y*W + x).
package tb_vcc_ref_pkg;

  function automatic int ones4(input int v);
    return ((v >> 0) & 1) + ((v >> 1) & 1) + ((v >> 2) & 1) + ((v >> 3) & 1);
  endfunction

  // 2-bit direction code of a gradient given as 6 x gradient
  function automatic int dir_code(input int g6, input int th1, input int th2);
    if (g6 > 6 * th1) return 1;        // positive 01
    if (g6 < 6 * th2) return 2;        // negative 10
    return 0;                          // neutral 00
  endfunction

  // vector code {x code, y code} of pixel (x,y); 0 on the frame border
  function automatic int ref_code(const ref int img[], input int W, input int H,
                                  input int x, input int y, input int th1, input int th2);
    int gx, gy;
    if (x == 0 || y == 0 || x == W - 1 || y == H - 1) return 0;
    gx = 0;
    gy = 0;
    for (int d = -1; d <= 1; d++) begin
      gx += img[(y + d) * W + x + 1] - img[(y + d) * W + x - 1];
      gy += img[(y + 1) * W + x + d] - img[(y - 1) * W + x + d];
    end
    return (dir_code(gx, th1, th2) << 2) | dir_code(gy, th1, th2);
  endfunction

  // code image of a whole intensity image
  function automatic void ref_encode(const ref int img[], input int W, input int H,
                                     input int th1, input int th2, ref int codes[]);
    codes = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) codes[y * W + x] = ref_code(img, W, H, x, y, th1, th2);
  endfunction

  // correlation of the N x N template t (raster order) with the partial
  // image of code image a whose lower-right code is (xb, yb)
  function automatic int ref_corr(const ref int a[], input int W, const ref int t[],
                                  input int N, input int xb, input int yb);
    int s;
    s = 0;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        s += ones4(a[(yb - N + 1 + j) * W + (xb - N + 1 + i)] ^ t[j * N + i]);
    return s;
  endfunction

  // correlation of two code images over the N x N window ending at (xb, yb)
  function automatic int ref_corr2(const ref int a[], const ref int b[], input int W,
                                   input int N, input int xb, input int yb);
    int s, k;
    s = 0;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) begin
        k = (yb - N + 1 + j) * W + (xb - N + 1 + i);
        s += ones4(a[k] ^ b[k]);
      end
    return s;
  endfunction

endpackage
