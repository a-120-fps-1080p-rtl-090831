// tb_feature_desc: presents banks of patches with random keypoint masks (an
// empty mask included) and checks that one feature per set keypoint bit
// leaves, left to right, with the right coordinates and descriptors, and
// that each bank is released exactly once, after its last feature.
// The last bank is the worst case of a block: all 10 pixels are keypoints and
// the output never stalls. It must be released within 1388 cycles, the
// describer's share of a 1080p frame at 120 fps and 200 MHz with 1.2K such
// blocks per frame (200e6 / 120 / 1200).
module tb_feature_desc;
  import feat_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 640, HH = 80;
  localparam int BLOCK_BUDGET = 200_000_000 / 120 / 1200;
  logic clk = 0, rst_n = 0;
  logic bank_valid, bank_release, feat_valid, feat_ready, busy;
  blk_kp_t bank_blk;
  logic [7:0] cur_patch [CUR_H][CUR_W];
  logic [7:0] prv_patch [PRV_H][PRV_W];
  feature_t feat;
  int checks = 0, failures = 0, n_feat = 0, n_rel = 0;
  always #5 clk = ~clk;

  feature_desc dut (.clk, .rst_n, .bank_valid, .bank_blk, .cur_patch, .prv_patch,
    .bank_release, .feat_valid, .feat_ready, .feat, .busy);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && bank_release) n_rel++;

  initial begin
    cur_patch_t cp;
    prv_patch_t pp;
    bank_valid = 0; bank_blk = '0; feat_ready = 0;
    for (int r = 0; r < CUR_H; r++) for (int c = 0; c < CUR_W; c++) cur_patch[r][c] = 0;
    for (int r = 0; r < PRV_H; r++) for (int c = 0; c < PRV_W; c++) prv_patch[r][c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 7; t++) begin
      blk_kp_t b;
      int rel0, k, t0;
      b.bx = BX_W'($urandom_range(3, W / BLK - 7));
      b.y  = Y_W'($urandom_range(CUR_Y0, HH - 26));
      b.mask = (t == 1) ? 10'h0 : (t == 2 || t == 6) ? 10'h3ff : 10'($urandom);
      img_patches(int'(b.bx), int'(b.y), W, HH, cp, pp);
      for (int r = 0; r < CUR_H; r++) for (int c = 0; c < CUR_W; c++) cur_patch[r][c] = cp[r][c];
      for (int r = 0; r < PRV_H; r++) for (int c = 0; c < PRV_W; c++) prv_patch[r][c] = pp[r][c];
      @(negedge clk);
      bank_valid = 1; bank_blk = b;
      rel0 = n_rel;
      t0 = cyc;
      k = 0;
      while (n_rel == rel0) begin
        @(negedge clk);
        feat_ready = (t == 6) || ($urandom_range(2) != 0);
        #1;
        if (feat_valid && feat_ready) begin
          int ox, oy, ea;
          logic [127:0] a0, a1, a2;
          while (k < BLK && !b.mask[k]) k++;
          freak_orient(cp, k, ox, oy);
          ea = atan_ref(ox, oy);
          a0 = freak_bits(cp, k, ea);
          a1 = freak_bits(cp, k, (ea + 1) % 256);
          a2 = freak_bits(cp, k, (ea + 255) % 256);
          checks++;
          n_feat++;
          if (k >= BLK || int'(feat.x) != int'(b.bx) * BLK + k || feat.y != b.y) begin
            failures++; $display("FAIL position x=%0d y=%0d k=%0d", feat.x, feat.y, k);
          end
          checks++;
          if (feat.mot !== motion_ref(cp, pp, k)) begin failures++; $display("FAIL motion k=%0d", k); end
          checks++;
          if (feat.app !== a0 && feat.app !== a1 && feat.app !== a2) begin
            failures++; $display("FAIL appearance k=%0d", k);
          end
          k++;
        end
      end
      while (k < BLK && !b.mask[k]) k++;
      checks++;
      if (k != BLK) begin failures++; $display("FAIL released after keypoint %0d", k); end
      if (t == 6) begin
        checks++;
        $display("full block described in %0d cycles (budget %0d)", cyc - t0, BLOCK_BUDGET);
        if (cyc - t0 > BLOCK_BUDGET) begin failures++; $display("FAIL over budget"); end
      end
      bank_valid = 0;
      @(negedge clk);
      checks++;
      if (n_rel != rel0 + 1) begin failures++; $display("FAIL released %0d times", n_rel - rel0); end
    end
    checks++;
    if (n_feat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
