// sr_model_pkg - bit-exact reference model of the super-resolution network,
// written independently of the RTL for the testbenches.
//
// Arithmetic: Q8.8 values; each output is sum(x*w) + (bias << 8), arithmetic
// shift right by 8, ReLU where the layer has one, saturation to 16 bits.
// Borders: coordinates outside the image are clamped to the edge (replicate).
// Stage 3 rounds each channel's filtered value back to Q8.8 before the channel
// sum, which is then saturated.
package sr_model_pkg;

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int finish(longint acc, int bias, bit relu);
    longint s;
    s = (acc + (longint'(bias) <<< 8)) >>> 8;
    if (relu && s < 0) s = 0;
    return sat16(s);
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // random Q8.8 value in [-lim, lim]
  function automatic int rnd(int lim);
    return int'($urandom_range(2 * lim, 0)) - lim;
  endfunction

  class sr_model;
    int W, H, K1, N1, N2, K3;
    int img[];          // H*W input pixels
    int w1[][];         // [N1][K1*K1]
    int b1[];
    int w2[][];         // [N2][N1]
    int b2[];
    int w3[][];         // [N2][K3*K3]
    int f1[][];         // [N1][H*W]
    int f2[][];         // [N2][H*W]
    int out[];          // H*W
    int relu_zero, saturations;

    function new(int w, int h, int k1 = 9, int n1 = 64, int n2 = 32, int k3 = 5);
      W = w; H = h; K1 = k1; N1 = n1; N2 = n2; K3 = k3;
      img = new[W*H];
      w1 = new[N1]; foreach (w1[i]) w1[i] = new[K1*K1];
      b1 = new[N1];
      w2 = new[N2]; foreach (w2[i]) w2[i] = new[N1];
      b2 = new[N2];
      w3 = new[N2]; foreach (w3[i]) w3[i] = new[K3*K3];
      f1 = new[N1]; foreach (f1[i]) f1[i] = new[W*H];
      f2 = new[N2]; foreach (f2[i]) f2[i] = new[W*H];
      out = new[W*H];
    endfunction

    function void randomize_all();
      foreach (img[i]) img[i] = int'($urandom_range(255, 0));
      foreach (w1[i, j]) w1[i][j] = rnd(40);
      foreach (b1[i]) b1[i] = rnd(256);
      foreach (w2[i, j]) w2[i][j] = rnd(64);
      foreach (b2[i]) b2[i] = rnd(256);
      foreach (w3[i, j]) w3[i][j] = rnd(48);
    endfunction

    // K x K correlation of plane p (H*W) at (r, c), weights w, replicate border
    function longint window(const ref int p[], int r, int c, int K, const ref int w[]);
      longint acc;
      int h;
      h = (K - 1) / 2;
      acc = 0;
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++)
          acc += longint'(p[clampi(r + i - h, 0, H - 1) * W + clampi(c + j - h, 0, W - 1)])
               * longint'(w[i*K + j]);
      return acc;
    endfunction

    function void run();
      run1(); run2(); run3();
    endfunction

    function void run1();
      relu_zero = 0;
      for (int f = 0; f < N1; f++)
        for (int r = 0; r < H; r++)
          for (int c = 0; c < W; c++) begin
            longint a;
            a = window(img, r, c, K1, w1[f]);
            f1[f][r*W + c] = finish(a, b1[f], 1);
            if ((a + (longint'(b1[f]) <<< 8)) < 0) relu_zero++;
          end
    endfunction

    function void run2();
      for (int n = 0; n < W*H; n++)
        for (int g = 0; g < N2; g++) begin
          longint a;
          a = 0;
          for (int f = 0; f < N1; f++) a += longint'(f1[f][n]) * longint'(w2[g][f]);
          f2[g][n] = finish(a, b2[g], 1);
        end
    endfunction

    function void run3();
      saturations = 0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          longint s;
          s = 0;
          for (int g = 0; g < N2; g++) s += longint'(finish(window(f2[g], r, c, K3, w3[g]), 0, 0));
          if (s > 32767 || s < -32768) saturations++;
          out[r*W + c] = sat16(s);
        end
    endfunction
  endclass

endpackage
