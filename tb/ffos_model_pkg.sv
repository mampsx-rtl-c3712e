// ffos_model_pkg: reference model of the FFoS image chain for the testbenches.
//
// Plain software versions of binarisation, 3x3 erosion with a zero border,
// row packing (ceil(W/32) words per row, bit k of word j = pixel 32*j+k) and
// projection/centre finding (midpoints of non-zero runs of the row and column
// projections, crossed in raster order, padded with 16'hFFFF to C tokens).
// Images are flat bit queues indexed y*W+x.
package ffos_model_pkg;

  typedef bit        bitimg_t[$];
  typedef bit [31:0] words_t[$];

  function automatic bitimg_t binarise(bit [31:0] pix[$], bit [31:0] thr);
    bitimg_t o;
    foreach (pix[i]) o.push_back(pix[i] > thr);
    return o;
  endfunction

  function automatic bitimg_t erode(bitimg_t img, int w, int h);
    bitimg_t o;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        bit v = 1;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            int yy = y + dy, xx = x + dx;
            if (yy < 0 || yy >= h || xx < 0 || xx >= w) v = 0;
            else if (!img[yy*w+xx]) v = 0;
          end
        o.push_back(v);
      end
    return o;
  endfunction

  function automatic words_t pack(bitimg_t img, int w, int h);
    words_t o;
    int rw = (w + 31) / 32;
    for (int y = 0; y < h; y++)
      for (int j = 0; j < rw; j++) begin
        bit [31:0] wd = 0;
        for (int k = 0; k < 32; k++)
          if (32*j + k < w) wd[k] = img[y*w + 32*j + k];
        o.push_back(wd);
      end
    return o;
  endfunction

  function automatic bitimg_t unpack(words_t wds, int w, int h);
    bitimg_t o;
    int rw = (w + 31) / 32;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) o.push_back(wds[y*rw + x/32][x%32]);
    return o;
  endfunction

  // midpoints of the runs of non-zero entries of v
  function automatic words_t runs(int v[$]);
    words_t o;
    int start = -1;
    for (int i = 0; i <= v.size(); i++) begin
      bit nz = (i < v.size()) && (v[i] != 0);
      if (nz && start < 0) start = i;
      if (!nz && start >= 0) begin
        o.push_back((start + i - 1) / 2);
        start = -1;
      end
    end
    return o;
  endfunction

  function automatic words_t centres(bitimg_t img, int w, int h, int c);
    int hp[$], vp[$];
    words_t rc, cc, o;
    for (int y = 0; y < h; y++) begin
      int s = 0;
      for (int x = 0; x < w; x++) s += img[y*w+x];
      hp.push_back(s);
    end
    for (int x = 0; x < w; x++) begin
      int s = 0;
      for (int y = 0; y < h; y++) s += img[y*w+x];
      vp.push_back(s);
    end
    rc = runs(hp);
    cc = runs(vp);
    foreach (rc[i]) foreach (cc[j])
      if (o.size() < c) o.push_back({16'h0, rc[i][7:0], cc[j][7:0]});
    while (o.size() < c) o.push_back(32'h0000_FFFF);
    return o;
  endfunction

  // Synthetic wafer image: a grid of bright rectangles on a dark background,
  // with salt noise of roughly one pixel in `noise`.
  function automatic void wafer(ref bit [31:0] pix[$], input int w, int h,
                                int rows, int cols, int noise, int seed);
    int dummy = $urandom(seed);
    pix.delete();
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        bit in_box = (y * rows / h * h / rows + 2 <= y) && (y < (y * rows / h + 1) * h / rows - 2) &&
                     (x * cols / w * w / cols + 3 <= x) && (x < (x * cols / w + 1) * w / cols - 3);
        bit [31:0] v = in_box ? 200 + $urandom_range(0, 40) : 20 + $urandom_range(0, 40);
        if (noise > 0 && $urandom_range(0, noise - 1) == 0) v = 250;
        pix.push_back(v);
      end
  endfunction

endpackage
