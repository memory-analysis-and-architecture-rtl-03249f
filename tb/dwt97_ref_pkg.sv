// dwt97_ref_pkg: behavioural reference of the (9,7) lifting DWT for the
// testbenches.
//
// It works on whole arrays, not streams: a sequence is mirrored by four samples
// at each end (whole-sample symmetric extension), the four lifting passes run
// over the extended array one after another, and the scaled coefficients of the
// original positions are returned in place (even positions low-pass, odd
// positions high-pass). The 2-D reference filters every column first, then
// every row; the rows may instead use the direct convolution form.
// Arithmetic: 16-bit wrap after every update, lifting products
// rounded half up at 12 fractional bits, matching the fixed-point rule the
// hardware is specified with.
package dwt97_ref_pkg;

  localparam int A = -6497, B = -217, G = 3616, D = 1817, ZL = 3330, ZH = 5039;
  // (9,7) analysis taps, centre outwards, for the convolution form
  localparam int H [5] = '{2470, 1093, -320, -69, 110};
  localparam int GH [4] = '{4567, -2422, -236, 374};

  function automatic int wrap16(int v);
    return int'(shortint'(v));
  endfunction

  function automatic int mac(int base, int u, int v, int c);
    return wrap16(base + ((c * (u + v) + 2048) >>> 12));
  endfunction

  function automatic int scl(int u, int c);
    return wrap16((c * u + 2048) >>> 12);
  endfunction

  function automatic int mirror(int i, int n);
    if (i < 0) return -i;
    if (i > n - 1) return 2 * (n - 1) - i;
    return i;
  endfunction

  // 1-D forward transform of x[0..n-1], result in place
  function automatic void dwt1d(ref int x[], input int n);
    int e[];
    e = new[n + 8];
    for (int i = 0; i < n + 8; i++) e[i] = x[mirror(i - 4, n)];
    for (int i = 1; i <= n + 6; i += 2) e[i] = mac(e[i], e[i-1], e[i+1], A);
    for (int i = 2; i <= n + 5; i += 2) e[i] = mac(e[i], e[i-1], e[i+1], B);
    for (int i = 3; i <= n + 4; i += 2) e[i] = mac(e[i], e[i-1], e[i+1], G);
    for (int i = 4; i <= n + 3; i += 2) e[i] = mac(e[i], e[i-1], e[i+1], D);
    for (int i = 0; i < n; i++)
      x[i] = (i % 2 == 0) ? scl(e[i+4], ZL) : scl(e[i+4], ZH);
  endfunction

  // 1-D forward transform by direct convolution with the (9,7) filters,
  // each output rounded once; result in place
  function automatic void conv1d(ref int x[], input int n);
    int y[];
    y = new[n];
    for (int i = 0; i < n; i++) begin
      int acc;
      acc = 2048;
      if (i % 2 == 0)
        for (int k = -4; k <= 4; k++) acc += H[k < 0 ? -k : k] * x[mirror(i + k, n)];
      else
        for (int k = -3; k <= 3; k++) acc += GH[k < 0 ? -k : k] * x[mirror(i + k, n)];
      y[i] = wrap16(acc >>> 12);
    end
    for (int i = 0; i < n; i++) x[i] = y[i];
  endfunction

  // 2-D forward transform of an n x n image (row-major, pixel values), columns
  // first; returns coefficients in row-major order at their pixel positions
  function automatic void dwt2d(ref int img[], ref int coef[], input int n, input bit row_conv = 0);
    int v[];
    v = new[n];
    coef = new[n * n];
    for (int i = 0; i < n * n; i++) coef[i] = img[i] * 4;
    for (int x = 0; x < n; x++) begin
      for (int r = 0; r < n; r++) v[r] = coef[r * n + x];
      dwt1d(v, n);
      for (int r = 0; r < n; r++) coef[r * n + x] = v[r];
    end
    for (int r = 0; r < n; r++) begin
      for (int x = 0; x < n; x++) v[x] = coef[r * n + x];
      if (row_conv) conv1d(v, n);
      else          dwt1d(v, n);
      for (int x = 0; x < n; x++) coef[r * n + x] = v[x];
    end
  endfunction

  // address offset of coefficient (r, x) in the subband (Mallat) layout
  function automatic int band_addr(int r, int x, int n);
    return ((r % 2) * (n / 2) + r / 2) * n + (x % 2) * (n / 2) + x / 2;
  endfunction

endpackage
