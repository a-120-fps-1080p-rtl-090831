// freak_desc: FREAK appearance descriptor of one keypoint.
//
// The sampling pattern has 43 circles: 7 concentric rings of 6 circles and
// one centre circle, grouped in 8 layers. Each layer owns one gauss_filter
// and one input selector; the selector walks over the layer's circles and,
// for each, over the 2H+1 rows of its window, feeding one row segment per
// cycle from the 64x51 current-frame patch. A circle's centre is its ring
// radius times the cosine and sine (from a 256-entry Q14 sine table) of its
// pattern angle plus the pattern rotation theta, rounded to a pixel.
//
// Sequence after start (kx = keypoint index 0..9 in the block, so the
// pattern is centred on patch column 25+kx, row 25):
//   1. sample all 43 circles with theta = 0;
//   2. orientation: x = sum over the 12 opposite-circle pairs of the even
//      rings of (I_c - I_c+3) * cos(angle_c), y likewise with sin, both in
//      Q8; atan_div turns (x, y) into one of 256 angles;
//   3. resample all 43 circles with theta = that angle;
//   4. desc[p] = I(pair_a(p)) > I(pair_b(p)) for the 128 pairs.
// done pulses with desc and angle valid, about 130 cycles after start.
// The 43-circle/8-layer pattern, layer-shared filters and selectors,
// orientation through an arctangent into 256 parts and the 16-byte output
// follow the document. Ring radii, kernel sizes, the orientation pairs and
// the description pairs are this design's (see feat_pkg).
module freak_desc
  import feat_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] kx,
  input  logic [7:0] cur_patch [CUR_H][CUR_W],
  output logic       done,
  output logic [127:0] desc,
  output logic [7:0] angle
);
  typedef enum logic [2:0] {S_IDLE, S_P1, S_ORI, S_ATAN, S_P2, S_CMP} state_t;
  state_t state;

  logic [7:0]  theta;
  logic [3:0]  kx_r;
  logic        pass_go;                   // one-cycle launch of a sampling pass
  logic [N_LAYERS-1:0] layer_done;
  logic [7:0]  samp [N_CIRCLES];
  logic [7:0]  samp_w [N_LAYERS][6];
  logic        atan_start, atan_done;
  logic [7:0]  atan_angle;
  logic signed [31:0] ox_full, oy_full;
  logic signed [23:0] ox, oy;

  // sine table, Q14, index in 1/256 turn
  logic signed [15:0] sint [256];
  for (genvar a = 0; a < 256; a++) begin : g_sin
    assign sint[a] = 16'(sin512(2*a));
  end

  // ---------------- per-layer selector and filter ----------------
  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    localparam int H  = layer_h(l);
    localparam int R  = layer_radius(l);
    localparam int NC = layer_n(l);

    logic [7:0] base_ang [NC];
    for (genvar c = 0; c < NC; c++) begin : g_ang
      assign base_ang[c] = 8'(circle_angle(l, c));
    end

    logic       run;
    logic [2:0] c_in, c_out;
    logic [3:0] r_in;
    logic [7:0] ang;
    logic signed [31:0] dx, dy;
    int         px, py;
    logic [7:0] seg [2*H+1];
    logic       vv;
    logic [7:0] vl;

    always_comb begin
      ang = base_ang[c_in] + theta;
      dx  = (32'(R) * 32'(sint[8'(ang + 8'd64)]) + 32'sd8192) >>> 14;
      dy  = (32'(R) * 32'(sint[ang]) + 32'sd8192) >>> 14;
      px  = CUR_X0 + int'(kx_r) + int'(dx);
      py  = CUR_Y0 + int'(dy);
      for (int i = 0; i < 2*H+1; i++)
        seg[i] = cur_patch[py - H + int'(r_in)][px - H + i];
    end

    gauss_filter #(.H(H)) u_gauss (
      .clk, .rst_n, .seg_valid(run), .seg, .val_valid(vv), .val(vl));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        run <= 1'b0; c_in <= '0; r_in <= '0; c_out <= '0; layer_done[l] <= 1'b0;
        for (int c = 0; c < 6; c++) samp_w[l][c] <= '0;
      end else begin
        if (pass_go) begin
          run <= 1'b1; c_in <= '0; r_in <= '0; c_out <= '0; layer_done[l] <= 1'b0;
        end else begin
          if (run) begin
            if (int'(r_in) == 2*H) begin
              r_in <= '0;
              if (int'(c_in) == NC-1) run <= 1'b0;
              else c_in <= c_in + 1'b1;
            end else r_in <= r_in + 1'b1;
          end
          if (vv) begin
            samp_w[l][c_out] <= vl;
            c_out <= c_out + 1'b1;
            if (int'(c_out) == NC-1) layer_done[l] <= 1'b1;
          end
        end
      end
    end
  end

  always_comb
    for (int g = 0; g < N_CIRCLES; g++) samp[g] = samp_w[g / 6][g % 6];

  // ---------------- orientation ----------------
  always_comb begin
    ox_full = '0;
    oy_full = '0;
    for (int l = 0; l < N_LAYERS - 1; l += 2)
      for (int c = 0; c < 3; c++) begin
        ox_full += (32'(samp[6*l+c]) - 32'(samp[6*l+c+3])) * 32'(sint[8'(circle_angle(l, c) + 64)]);
        oy_full += (32'(samp[6*l+c]) - 32'(samp[6*l+c+3])) * 32'(sint[8'(circle_angle(l, c))]);
      end
    ox = 24'(ox_full >>> 6);
    oy = 24'(oy_full >>> 6);
  end

  atan_div #(.IN_W(24), .FRAC(12)) u_atan (
    .clk, .rst_n, .start(atan_start), .x(ox), .y(oy),
    .done(atan_done), .angle(atan_angle));

  // ---------------- sequence ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; theta <= '0; kx_r <= '0; pass_go <= 1'b0;
      atan_start <= 1'b0; done <= 1'b0; desc <= '0; angle <= '0;
    end else begin
      pass_go    <= 1'b0;
      atan_start <= 1'b0;
      done       <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          kx_r    <= kx;
          theta   <= '0;
          pass_go <= 1'b1;
          state   <= S_P1;
        end
        S_P1: if (!pass_go && &layer_done) state <= S_ORI;
        S_ORI: begin
          atan_start <= 1'b1;
          state      <= S_ATAN;
        end
        S_ATAN: if (atan_done) begin
          theta   <= atan_angle;
          angle   <= atan_angle;
          pass_go <= 1'b1;
          state   <= S_P2;
        end
        S_P2: if (!pass_go && &layer_done) state <= S_CMP;
        S_CMP: begin
          for (int p = 0; p < 128; p++) desc[p] <= (samp[pair_a(p)] > samp[pair_b(p)]);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
