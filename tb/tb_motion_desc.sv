// tb_motion_desc: random and image patches (with the previous frame a
// shifted copy) against a direct SAD recomputation; done must come 26
// cycles after start.
module tb_motion_desc;
  import feat_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 640, HH = 80;
  logic clk = 0, rst_n = 0;
  logic start, done;
  logic [3:0] kx;
  logic [7:0] cur_patch [CUR_H][CUR_W];
  logic [7:0] prv_patch [PRV_H][PRV_W];
  logic [127:0] desc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  motion_desc #(.DISP(4)) dut (.clk, .rst_n, .start, .kx, .cur_patch, .prv_patch, .done, .desc);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cur_patch_t cp;
    prv_patch_t pp;
    start = 0; kx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      int n, k;
      k = $urandom_range(9);
      if (t % 2) img_patches($urandom_range(3, W / BLK - 7), $urandom_range(CUR_Y0, HH - 26), W, HH, cp, pp);
      else begin
        for (int r = 0; r < CUR_H; r++) for (int c = 0; c < CUR_W; c++) cp[r][c] = 8'($urandom);
        for (int r = 0; r < PRV_H; r++) for (int c = 0; c < PRV_W; c++) pp[r][c] = 8'($urandom);
      end
      for (int r = 0; r < CUR_H; r++) for (int c = 0; c < CUR_W; c++) cur_patch[r][c] = cp[r][c];
      for (int r = 0; r < PRV_H; r++) for (int c = 0; c < PRV_W; c++) prv_patch[r][c] = pp[r][c];
      @(negedge clk);
      kx = 4'(k); start = 1;
      @(negedge clk) start = 0;
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      checks++;
      if (n != 26) begin failures++; $display("FAIL %0d cycles", n); end
      checks++;
      if (desc !== motion_ref(cp, pp, k)) begin failures++; $display("FAIL desc kx=%0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
