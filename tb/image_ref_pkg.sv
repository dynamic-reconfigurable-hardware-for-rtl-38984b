// Reference model of the image modeller for the testbenches: gradient
// adjusted prediction, texture pattern, error energy, error feedback and
// error mapping, written as plain integer software.
package image_ref_pkg;

  function automatic int iabs(int a);
    return (a < 0) ? -a : a;
  endfunction

  function automatic int floor_div(int a, int b);
    int q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  // neighbours: n, w, nn, ww, nw, ne, nne
  function automatic void gap(input int n, w, nn, ww, nw, ne, nne,
                              output int dh, dv, pred, tex);
    int d, b4, p16;
    dh = iabs(w - ww) + iabs(n - nw) + iabs(n - ne);
    dv = iabs(w - nw) + iabs(n - nn) + iabs(ne - nne);
    d  = dv - dh;
    b4 = 2 * (w + n) + ne - nw;            // 4 x ((W+N)/2 + (NE-NW)/4)
    if (d > 80)       p16 = 16 * w;
    else if (d < -80) p16 = 16 * n;
    else if (d > 32)  p16 = 2 * (b4 + 4 * w);
    else if (d > 8)   p16 = 3 * b4 + 4 * w;
    else if (d < -32) p16 = 2 * (b4 + 4 * n);
    else if (d < -8)  p16 = 3 * b4 + 4 * n;
    else              p16 = 4 * b4;
    pred = floor_div(p16, 16);
    if (pred < 0) pred = 0;
    if (pred > 255) pred = 255;
    tex = 0;
    if (n  < pred) tex += 1;
    if (w  < pred) tex += 2;
    if (nw < pred) tex += 4;
    if (ne < pred) tex += 8;
    if (nn < pred) tex += 16;
    if (ww < pred) tex += 32;
  endfunction

  function automatic int qe_of(int dh, int dv, int ew);
    int delta, q;
    int thr [7] = '{5, 15, 25, 42, 60, 85, 140};
    delta = dh + dv + 2 * iabs(ew);
    q = 0;
    foreach (thr[i]) if (delta >= thr[i]) q = i + 1;
    return q;
  endfunction

  // error feedback state of one image
  class image_model;
    int width;
    int sum [512];
    int cnt [512];
    int rows [$];   // all pixels so far, raster order
    int ew;
    int n_guard;

    function new(int width_);
      width = width_;
      reset();
    endfunction

    function void reset();
      foreach (sum[i]) begin sum[i] = 0; cnt[i] = 0; end
      rows.delete();
      ew = 0;
    endfunction

    function int px(int r, int c);
      if (r < 0 || c < 0 || c >= width) return 0;
      return rows[r * width + c];
    endfunction

    // returns mapped error and context of pixel x at the next position
    function void step(input int x, output int mapped, output int ctx);
      int k, r, c, dh, dv, pred, tex, q, mean, xt, e, e8;
      k = rows.size(); r = k / width; c = k % width;
      gap(px(r-1, c), px(r, c-1), px(r-2, c), px(r, c-2), px(r-1, c-1),
          px(r-1, c+1), px(r-2, c+1), dh, dv, pred, tex);
      q = qe_of(dh, dv, ew);
      ctx = tex * 8 + q;
      mean = (cnt[ctx] == 0) ? 0 : sum[ctx] / cnt[ctx];   // truncates toward 0
      xt = pred + mean;
      if (xt < 0) xt = 0;
      if (xt > 255) xt = 255;
      e = x - xt;
      ew = e;
      e8 = ((e % 256) + 256) % 256;
      if (e8 >= 128) e8 -= 256;
      mapped = (e8 >= 0) ? 2 * e8 : -2 * e8 - 1;
      sum[ctx] += e;
      cnt[ctx] += 1;
      if (cnt[ctx] == 31) begin
        sum[ctx] = floor_div(sum[ctx], 2);
        cnt[ctx] = 15;
        n_guard++;
      end
      rows.push_back(x);
    endfunction
  endclass

  // synthetic test picture: smooth shading, an edge, texture and noise
  function automatic int test_pixel(int r, int c, int seed);
    int v;
    v = (r * 3 + c * 2 + seed) % 200;
    if (c > 20 && c < 40) v = v + 50;
    if (((r / 4) + (c / 4)) % 5 == 0) v = v + 30;
    v = v + int'($urandom_range(0, 6)) - 3;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

endpackage
