// tb_ref_pkg: test images and reference models for the testbenches.
//
// The test frames are defined by functions of (x, y) so that neither the
// memory model nor the checkers need stored images: a hashed texture with
// bright 12x12 squares (their corners are FAST corners), the previous frame
// is the current one shifted by (2, 1), and the binary mask marks square
// corners and a sparse set of hashed points. The reference models recompute
// FAST, the binomial Gaussian sampling, the FREAK descriptor, the arctangent
// (with real arithmetic) and the SAD motion descriptor directly, loop by
// loop, without the hardware's schedules.
package tb_ref_pkg;
  import feat_pkg::*;

  typedef logic [7:0] cur_patch_t [CUR_H][CUR_W];
  typedef logic [7:0] prv_patch_t [PRV_H][PRV_W];

  function automatic int unsigned hash2(int x, int y);
    int unsigned h;
    h = (x * 32'd73856093) ^ (y * 32'd19349663) ^ 32'h9e3779b9;
    h = h ^ (h >> 13);
    h = h * 32'h5bd1e995;
    h = h ^ (h >> 15);
    return h;
  endfunction

  localparam int N_SQ = 24;
  localparam int SQ   = 12;

  function automatic bit in_square(int x, int y, int w, int h, output int sx, output int sy);
    for (int s = 0; s < N_SQ; s++) begin
      sx = 30 + (s * 173) % (w - 80);
      sy = 28 + (s * 37) % (h - 60);
      if (x >= sx && x < sx + SQ && y >= sy && y < sy + SQ) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic logic [7:0] cur_pix(int x, int y, int w, int h);
    int sx, sy;
    if (in_square(x, y, w, h, sx, sy)) return 8'(200 + (hash2(x, y) & 15));
    return 8'(60 + (hash2(x, y) & 31));
  endfunction

  function automatic logic [7:0] prev_pix(int x, int y, int w, int h);
    return cur_pix(x - 2, y - 1, w, h);
  endfunction

  // salient: the 3x3 neighbourhood of square corners, and 1 in MASK_DEN pixels
  function automatic bit mask_bit(int x, int y, int w, int h, int mask_den);
    for (int s = 0; s < N_SQ; s++) begin
      int sx, sy;
      sx = 30 + (s * 173) % (w - 80);
      sy = 28 + (s * 37) % (h - 60);
      for (int cy = 0; cy < 2; cy++)
        for (int cx = 0; cx < 2; cx++)
          if ((x - (sx + cx*(SQ-1)) <= 1) && (x - (sx + cx*(SQ-1)) >= -1) &&
              (y - (sy + cy*(SQ-1)) <= 1) && (y - (sy + cy*(SQ-1)) >= -1)) return 1'b1;
    end
    return (hash2(x + 7, y + 3) % mask_den) == 0;
  endfunction

  // ---------------- FAST 9-16 ----------------
  function automatic bit fast_ref(logic [7:0] c, logic [7:0] circ [16], int thr);
    int run_b, run_d, best;
    best = 0; run_b = 0; run_d = 0;
    for (int i = 0; i < 32; i++) begin          // two laps catch wrap-around runs
      int p;
      p = circ[i % 16];
      run_b = (p - int'(c) >= thr) ? run_b + 1 : 0;
      run_d = (int'(c) - p >= thr) ? run_d + 1 : 0;
      if (run_b > best) best = run_b;
      if (run_d > best) best = run_d;
    end
    return best >= 9;
  endfunction

  function automatic bit fast_img(int x, int y, int w, int h);
    int cx [16] = '{ 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3,-3,-3,-2,-1};
    int cy [16] = '{-3,-3,-2,-1, 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3};
    logic [7:0] circ [16];
    for (int i = 0; i < 16; i++) circ[i] = cur_pix(x + cx[i], y + cy[i], w, h);
    return fast_ref(cur_pix(x, y, w, h), circ, 30);
  endfunction

  // ---------------- binomial Gaussian sample ----------------
  function automatic int binom(int n, int k);
    int row [0:16];
    for (int i = 0; i <= n; i++) begin
      row[i] = 1;
      for (int j = i - 1; j > 0; j--) row[j] = row[j] + row[j-1];
    end
    return row[k];
  endfunction

  function automatic logic [7:0] gauss_ref(input cur_patch_t p, int cx, int cy, int hh);
    longint s;
    s = 0;
    for (int r = -hh; r <= hh; r++)
      for (int c = -hh; c <= hh; c++)
        s += longint'(binom(2*hh, r + hh)) * binom(2*hh, c + hh) * p[cy + r][cx + c];
    return 8'((s + (longint'(1) << (4*hh - 1))) >> (4*hh));
  endfunction

  // rounded offset R * trig(a) as the hardware defines it (Q14 table)
  function automatic int rot_off(int r, int q14);
    return (r * q14 + 8192) >>> 14;
  endfunction

  function automatic void freak_samples(input cur_patch_t p, int kx, int theta,
                                        output logic [7:0] s [N_CIRCLES]);
    for (int g = 0; g < N_CIRCLES; g++) begin
      int l, c, a, dx, dy;
      l = g / 6; c = g % 6;
      a = (circle_angle(l, c) + theta) % 256;
      dx = rot_off(layer_radius(l), sin512(2 * ((a + 64) % 256)));
      dy = rot_off(layer_radius(l), sin512(2 * a));
      s[g] = gauss_ref(p, CUR_X0 + kx + dx, CUR_Y0 + dy, layer_h(l));
    end
  endfunction

  // orientation vector (Q8) from theta = 0 samples
  function automatic void freak_orient(input cur_patch_t p, int kx, output int ox, output int oy);
    logic [7:0] s [N_CIRCLES];
    longint sx, sy;
    freak_samples(p, kx, 0, s);
    sx = 0; sy = 0;
    for (int l = 0; l < 7; l += 2)
      for (int c = 0; c < 3; c++) begin
        int d;
        d = int'(s[6*l+c]) - int'(s[6*l+c+3]);
        sx += longint'(d) * sin512(2 * ((circle_angle(l, c) + 64) % 256));
        sy += longint'(d) * sin512(2 * circle_angle(l, c));
      end
    ox = int'(sx >>> 6);
    oy = int'(sy >>> 6);
  endfunction

  // atan2 in 1/256 turn, rounded, real arithmetic
  function automatic int atan_ref(int x, int y);
    real a;
    int  r;
    if (x == 0 && y == 0) return 0;
    a = $atan2(real'(y), real'(x)) * 256.0 / (2.0 * 3.14159265358979);
    r = $rtoi(a + 256.5) % 256;
    return r;
  endfunction

  function automatic int ang_dist(int a, int b);
    int d;
    d = (a - b + 256) % 256;
    return (d > 128) ? 256 - d : d;
  endfunction

  function automatic logic [127:0] freak_bits(input cur_patch_t p, int kx, int theta);
    logic [7:0] s [N_CIRCLES];
    logic [127:0] d;
    freak_samples(p, kx, theta, s);
    for (int q = 0; q < 128; q++) d[q] = s[pair_a(q)] > s[pair_b(q)];
    return d;
  endfunction

  // ---------------- motion (SAD) ----------------
  function automatic logic [127:0] motion_ref(const ref cur_patch_t cp, const ref prv_patch_t pp, int kx);
    int ofs [4] = '{-3, -1, 1, 3};
    int dxs [8] = '{4, 4, 0, -4, -4, -4, 0, 4};
    int dys [8] = '{0, 4, 4, 4, 0, -4, -4, -4};
    logic [127:0] d;
    for (int n = 0; n < 16; n++) begin
      int sad [8];
      for (int i = 0; i < 8; i++) begin
        sad[i] = 0;
        for (int r = -1; r <= 1; r++)
          for (int c = -1; c <= 1; c++) begin
            int a, b;
            a = cp[CUR_Y0 + ofs[n/4] + r][CUR_X0 + kx + ofs[n%4] + c];
            b = pp[PRV_Y0 + ofs[n/4] + dys[i] + r][PRV_X0 + kx + ofs[n%4] + dxs[i] + c];
            sad[i] += (a > b) ? a - b : b - a;
          end
      end
      for (int i = 0; i < 8; i++) d[8*n + i] = sad[i] < sad[(i+1) % 8];
    end
    return d;
  endfunction

  // patches of a block taken straight from the test images
  function automatic void img_patches(int bx, int y, int w, int h,
                                      output cur_patch_t cp, output prv_patch_t pp);
    for (int r = 0; r < CUR_H; r++)
      for (int c = 0; c < CUR_W; c++)
        cp[r][c] = cur_pix(bx*BLK - CUR_X0 + c, y - CUR_Y0 + r, w, h);
    for (int r = 0; r < PRV_H; r++)
      for (int c = 0; c < PRV_W; c++)
        pp[r][c] = prev_pix(bx*BLK - PRV_X0 + c, y - PRV_Y0 + r, w, h);
  endfunction
endpackage
