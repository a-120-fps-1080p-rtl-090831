// tb_freak_desc: describes keypoints on image patches (square corners, so
// the orientation varies) and on random patches. The orientation must be
// within one step of a real-valued atan2 of the reference orientation
// vector, and the 128 bits must equal a direct recomputation of the rotated,
// smoothed pattern. A keypoint must take at most 138 cycles, the budget of
// 1,200 fully populated blocks per frame at 120 fps and 200 MHz.
module tb_freak_desc;
  import feat_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 640, HH = 80;
  logic clk = 0, rst_n = 0;
  logic start, done;
  logic [3:0] kx;
  logic [7:0] cur_patch [CUR_H][CUR_W];
  logic [127:0] desc;
  logic [7:0] angle;
  int checks = 0, failures = 0, max_cyc = 0;
  int angles_seen [256];
  always #5 clk = ~clk;

  freak_desc dut (.clk, .rst_n, .start, .kx, .cur_patch, .done, .desc, .angle);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cur_patch_t cp;
    prv_patch_t pp;
    int n_ang;
    start = 0; kx = 0;
    for (int r = 0; r < CUR_H; r++) for (int c = 0; c < CUR_W; c++) cur_patch[r][c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int ox, oy, ea, n, k;
      k = $urandom_range(9);
      if (t % 3 != 2) begin
        int s, sx, sy;
        s = $urandom_range(N_SQ - 1);
        sx = 30 + (s * 173) % (W - 80) + ((t % 2) ? SQ - 1 : 0) - k;
        sy = 28 + (s * 37) % (HH - 60) + ((t % 4 < 2) ? SQ - 1 : 0);
        if (sx < 30) sx = 30;
        img_patches((sx + 9) / BLK, sy < CUR_Y0 ? CUR_Y0 : sy, W, 2 * HH, cp, pp);
      end else
        for (int r = 0; r < CUR_H; r++) for (int c = 0; c < CUR_W; c++) cp[r][c] = 8'($urandom);
      for (int r = 0; r < CUR_H; r++) for (int c = 0; c < CUR_W; c++) cur_patch[r][c] = cp[r][c];
      @(negedge clk);
      kx = 4'(k); start = 1;
      @(negedge clk) start = 0;
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      if (n > max_cyc) max_cyc = n;
      freak_orient(cp, k, ox, oy);
      ea = atan_ref(ox, oy);
      checks++;
      if (ang_dist(int'(angle), ea) > 1) begin
        failures++; $display("FAIL angle got %0d exp %0d (x=%0d y=%0d)", angle, ea, ox, oy);
      end
      angles_seen[angle]++;
      checks++;
      if (desc !== freak_bits(cp, k, int'(angle))) begin
        failures++; $display("FAIL desc kx=%0d got %h exp %h", k, desc, freak_bits(cp, k, int'(angle)));
      end
    end
    checks++;
    if (max_cyc > 138) begin failures++; $display("FAIL %0d cycles per keypoint", max_cyc); end
    n_ang = 0;
    foreach (angles_seen[a]) if (angles_seen[a] != 0) n_ang++;
    checks++;
    if (n_ang < 8) begin failures++; $display("FAIL only %0d distinct angles", n_ang); end
    $display("max %0d cycles per keypoint, %0d distinct angles", max_cyc, n_ang);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
