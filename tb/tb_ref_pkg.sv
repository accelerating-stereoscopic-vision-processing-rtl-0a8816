// tb_ref_pkg: reference models used by the testbenches.
//
// Plain software versions of the pipeline's arithmetic, written from the
// definitions (gray weights, 3x3 windows taken from a raster stream, rank
// filters, Sobel magnitude, SAD/SSD/correlation), with no reference to the
// RTL's structure. Images are int arrays in raster order; a stream index
// outside the image reads as zero, as an idle stream does in the hardware.
package tb_ref_pkg;

  typedef int img_t [];

  function automatic int gray_of(int r, int g, int b);
    return (77 * r + 150 * g + 29 * b) / 256;
  endfunction

  function automatic int at(const ref img_t s, input int i);
    if (i < 0 || i >= s.size()) return 0;
    return s[i];
  endfunction

  // the nine pixels of the window whose top-left stream index is i
  function automatic void window(const ref img_t s, input int w, input int i, output int v [9]);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) v[r*3+c] = at(s, i + r*w + c);
  endfunction

  function automatic int rank9(int v [9], int k);
    int t [9];
    t = v;
    for (int a = 0; a < 9; a++)
      for (int b = a + 1; b < 9; b++)
        if (t[b] < t[a]) begin int x = t[a]; t[a] = t[b]; t[b] = x; end
    return t[k];
  endfunction

  function automatic int iabs(int x);
    return (x < 0) ? -x : x;
  endfunction

  // whole pre-processing chain on one frame of w*h pixels (RGB packed 24b)
  function automatic img_t preprocess(const ref img_t rgb, input int w, input int thr, input bit erode);
    int n = rgb.size();
    img_t g, m, b, o;
    int v [9];
    g = new[n]; m = new[n]; b = new[n]; o = new[n];
    for (int i = 0; i < n; i++)
      g[i] = gray_of((rgb[i] >> 16) & 255, (rgb[i] >> 8) & 255, rgb[i] & 255);
    for (int i = 0; i < n; i++) begin
      window(g, w, i, v);
      m[i] = rank9(v, 4);
    end
    for (int i = 0; i < n; i++) begin
      int gx, gy;
      window(m, w, i, v);
      gx = -v[0] - 2*v[1] - v[2] + v[6] + 2*v[7] + v[8];
      gy = -v[0] + v[2] - 2*v[3] + 2*v[5] - v[6] + v[8];
      b[i] = (iabs(gx) + iabs(gy) >= thr) ? 255 : 0;
    end
    for (int i = 0; i < n; i++) begin
      window(b, w, i, v);
      o[i] = rank9(v, erode ? 0 : 8);
    end
    return o;
  endfunction

  function automatic int sad9(int a [9], int b [9]);
    int s = 0;
    for (int i = 0; i < 9; i++) s += iabs(a[i] - b[i]);
    return s;
  endfunction

  function automatic int ssd9(int a [9], int b [9]);
    int s = 0;
    for (int i = 0; i < 9; i++) s += (a[i] - b[i]) * (a[i] - b[i]);
    return s;
  endfunction

  function automatic int corr9(int a [9], int b [9]);
    int s = 0;
    for (int i = 0; i < 9; i++) s += a[i] * b[i];
    return s;
  endfunction

  // Search streams: pass d of the left stream is the left image; pass d of
  // the right stream is the right image moved d columns right (zero where
  // x < d). The passes follow each other with nothing between them.
  function automatic img_t search_stream(const ref img_t im, input int w, input int d_max, input bit right);
    int n = im.size();
    img_t s;
    s = new[n * d_max];
    for (int d = 0; d < d_max; d++)
      for (int j = 0; j < n; j++)
        s[d*n + j] = !right ? im[j] : ((j % w) >= d ? im[j - d] : 0);
    return s;
  endfunction

endpackage
