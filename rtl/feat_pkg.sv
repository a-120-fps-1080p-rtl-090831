// feat_pkg: types and constants shared by the block-based MoFREAK feature
// extraction engine.
//
// A block-based keypoint groups 10 horizontally adjacent pixels; it is carried
// as its block column, its row and a 10-bit mask (salient pixels out of the
// screening stage, corner pixels out of the FAST stage). The sine table used
// to rotate the FREAK sampling pattern and the tangent bounds of the
// arctangent are produced at elaboration from sin512(), an integer Taylor
// series, so no table file is needed.
package feat_pkg;

  localparam int BLK      = 10;   // pixels per block-based keypoint
  localparam int BUS_W    = 128;  // image bus width in bits
  localparam int BUS_B    = 16;   // bytes per bus word
  localparam int ADDR_W   = 32;
  localparam int BX_W     = 8;    // block column, 1920/10 = 192 blocks
  localparam int Y_W      = 11;   // row, up to 2047
  localparam int X_W      = 11;   // pixel column

  // Patch geometry of the image preload stage (64x51 current, 32x19 previous).
  localparam int CUR_W    = 64;
  localparam int CUR_H    = 51;
  localparam int PRV_W    = 32;
  localparam int PRV_H    = 19;
  localparam int CUR_X0   = 25;   // patch column of the block's first pixel
  localparam int CUR_Y0   = 25;   // patch row of the keypoint row
  localparam int PRV_X0   = 11;
  localparam int PRV_Y0   = 9;

  typedef struct packed {
    logic [BX_W-1:0] bx;
    logic [Y_W-1:0]  y;
    logic [BLK-1:0]  mask;
  } blk_kp_t;

  typedef struct packed {
    logic [X_W-1:0] x;
    logic [Y_W-1:0] y;
    logic [127:0]   app;   // FREAK appearance bits
    logic [127:0]   mot;   // MIP motion bits
  } feature_t;

  // FREAK-style pattern: 8 layers (7 rings of 6 circles + the centre).
  localparam int N_LAYERS  = 8;
  localparam int N_CIRCLES = 43;

  function automatic int layer_radius(int l);
    case (l)
      0: return 21; 1: return 16; 2: return 11; 3: return 8;
      4: return 5;  5: return 4;  6: return 3;  default: return 0;
    endcase
  endfunction

  function automatic int layer_h(int l);   // Gaussian kernel half-width
    case (l)
      0: return 4; 1: return 3; 2: return 3; 3: return 2;
      4: return 2; default: return 1;
    endcase
  endfunction

  function automatic int layer_n(int l);
    return (l == N_LAYERS-1) ? 1 : 6;
  endfunction

  // Angle (in 1/256 turn) of circle c of layer l before rotation.
  function automatic int circle_angle(int l, int c);
    return ((l % 2) * 21 + (c * 256 + 3) / 6) % 256;
  endfunction

  // sin(2*pi*i/512) in Q14, computed with a 64-bit integer Taylor series.
  function automatic int sin512(int i);
    longint x, x2, term, s;
    int     q, k;
    bit     neg;
    k   = ((i % 512) + 512) % 512;
    neg = (k >= 256);
    k   = k % 256;
    if (k > 128) k = 256 - k;                 // fold into [0, pi/2]
    // x = k * (2*pi/512) in Q30
    x    = (longint'(k) * 64'd13176795) >>> 0; // 2*pi/512 * 2^30 = 13176794.6
    x2   = (x * x) >>> 30;
    term = x;
    s    = x;
    for (int n = 1; n <= 7; n++) begin
      term = -((term * x2) >>> 30) / longint'((2*n) * (2*n+1));
      s    = s + term;
    end
    q = int'((s + (64'sd1 <<< 15)) >>> 16);    // Q30 -> Q14
    return neg ? -q : q;
  endfunction

  function automatic int cos512(int i);
    return sin512(i + 128);
  endfunction

  // Pair p of the 128 description comparisons.
  function automatic int pair_a(int p);
    return p % N_CIRCLES;
  endfunction
  function automatic int pair_b(int p);
    return (p % N_CIRCLES + 1 + 13 * (p / N_CIRCLES)) % N_CIRCLES;
  endfunction

endpackage
