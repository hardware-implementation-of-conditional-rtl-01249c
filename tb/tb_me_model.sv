// tb_me_model: reference model of the conditional 2D-logarithmic search, used by
// the testbenches to work out expected motion vectors, best SADs and cycle
// counts without looking at the RTL.
//
// Frames are 64x64 arrays of 8-bit pixels in raster order. The model follows the
// search rules written out in plain procedural code: co-located SAD against the
// threshold, diamond steps (centre, left, right, up, down) with strict-less
// updates, halving on a centre or border winner, then a nine-point square step.
// It also counts the events the testbenches must see happen.
package tb_me_model;

  localparam int W = 64;
  localparam int H = 64;
  localparam int N = 4;   // block edge
  localparam int R = 16;  // half of the 32x32 search area

  typedef byte unsigned frame_t [W*H];

  typedef struct {
    int mvx, mvy, bsad, cycles;
    int skipped, diamonds, moves, center_halvings, border_halvings, excluded, squares;
  } result_t;

  function automatic int blk_sad(const ref frame_t c, const ref frame_t r,
                                 input int cx, cy, rx, ry);
    int s = 0;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) begin
        int a = c[(cy+j)*W + cx+i];
        int b = r[(ry+j)*W + rx+i];
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  function automatic result_t search(const ref frame_t c, const ref frame_t r,
                                     input int cx, cy, step0, thresh);
    result_t res = '{default: 0};
    int xl = (cx - R < 0) ? 0 : cx - R;
    int xh = (cx + R > W - N) ? W - N : cx + R;
    int yl = (cy - R < 0) ? 0 : cy - R;
    int yh = (cy + R > H - N) ? H - N : cy + R;
    int px = cx, py = cy, s = (step0 == 0) ? 1 : step0;
    int colo = blk_sad(c, r, cx, cy, cx, cy);
    int dxs[4] = '{-1, 1, 0, 0};
    int dys[4] = '{0, 0, -1, 1};
    if (colo <= thresh) begin
      res.skipped = 1;
      res.bsad    = colo;
      res.cycles  = 2;
      return res;
    end
    forever begin
      int best = blk_sad(c, r, cx, cy, px, py);
      int bx = px, by = py;
      res.diamonds++;
      res.cycles += 2;
      for (int k = 0; k < 4; k++) begin
        int x = px + dxs[k] * s, y = py + dys[k] * s;
        if (x < xl || x > xh || y < yl || y > yh) begin
          res.excluded++;
          continue;
        end
        if (blk_sad(c, r, cx, cy, x, y) < best) begin
          best = blk_sad(c, r, cx, cy, x, y);
          bx = x; by = y;
        end
      end
      if (bx == px && by == py) begin
        s = s / 2;
        res.center_halvings++;
      end else if (bx == xl || bx == xh || by == yl || by == yh) begin
        s = s / 2;
        res.border_halvings++;
        res.moves++;
      end else begin
        res.moves++;
      end
      px = bx; py = by;
      if (s <= 1) break;
    end
    begin
      int best = blk_sad(c, r, cx, cy, px, py);
      int bx = px, by = py;
      res.squares++;
      res.cycles += 2;
      for (int j = -1; j <= 1; j++)
        for (int i = -1; i <= 1; i++) begin
          int x = px + i, y = py + j;
          if (x < xl || x > xh || y < yl || y > yh) begin
            res.excluded++;
            continue;
          end
          if (blk_sad(c, r, cx, cy, x, y) < best) begin
            best = blk_sad(c, r, cx, cy, x, y);
            bx = x; by = y;
          end
        end
      res.mvx  = bx - cx;
      res.mvy  = by - cy;
      res.bsad = best;
    end
    return res;
  endfunction

  // Smooth test scene: a few bright blobs on a gradient, plus a little noise,
  // so that block matching has a clear optimum. The current frame is the
  // reference shifted by (dx, dy), with a noise term of its own.
  function automatic int scene(int x, int y);
    int v = 40 + x + y;
    int d1 = (x - 20) * (x - 20) + (y - 24) * (y - 24);
    int d2 = (x - 44) * (x - 44) + (y - 40) * (y - 40);
    if (d1 < 400) v += (400 - d1) / 4;
    if (d2 < 300) v += (300 - d2) / 3;
    return (v > 255) ? 255 : v;
  endfunction

  function automatic void make_frames(ref frame_t c, ref frame_t r,
                                      input int dx, dy, noise);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v = scene(x, y) + ((noise > 0) ? int'($urandom_range(noise)) : 0);
        int u = scene(x - dx, y - dy) + ((noise > 0) ? int'($urandom_range(noise)) : 0);
        r[y*W + x] = byte'((v > 255) ? 255 : v);
        c[y*W + x] = byte'((u > 255) ? 255 : u);
      end
  endfunction

endpackage
