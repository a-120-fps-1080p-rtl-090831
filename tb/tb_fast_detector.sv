// tb_fast_detector: offers blocks (random ones and blocks on square
// corners) to the detector over a stalling memory model and compares the
// packed keypoint masks with FAST run on the test image; blocks without a
// corner must be dropped, and every block must cost exactly 7 bus reads.
module tb_fast_detector;
  import feat_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 640, HH = 80;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, req_valid, req_ready, rsp_valid, out_valid, out_ready;
  logic [ADDR_W-1:0] req_addr;
  logic [BUS_W-1:0]  rsp_data;
  blk_kp_t in_blk, out_blk;
  blk_kp_t exp_q [$];
  int checks = 0, failures = 0, n_blocks = 0, n_kp = 0, n_drop = 0;
  always #5 clk = ~clk;

  fast_detector #(.IMG_W(W), .THRESH(30)) dut (.clk, .rst_n, .cur_base(32'h0200_0000),
    .in_valid, .in_ready, .in_blk, .req_valid, .req_ready, .req_addr, .rsp_valid, .rsp_data,
    .out_valid, .out_ready, .out_blk);
  frame_mem_model #(.IMG_W(W), .IMG_H(HH), .LAT(3), .STALL_PCT(20)) mem (
    .clk, .rst_n, .req_valid, .req_ready, .req_addr, .rsp_valid, .rsp_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    n_kp++;
    if (exp_q.size() == 0 || out_blk !== exp_q[0]) begin
      failures++;
      $display("FAIL got bx=%0d y=%0d m=%b exp m=%b", out_blk.bx, out_blk.y, out_blk.mask,
               exp_q.size() ? exp_q[0].mask : 10'h0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  initial begin
    in_valid = 0; in_blk = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      blk_kp_t b, e;
      int sx, sy;
      if (t % 2 == 0) begin                   // a block on a square corner
        int s;
        s = $urandom_range(N_SQ - 1);
        sx = 30 + (s * 173) % (W - 80) + ((t % 4 == 0) ? 0 : SQ - 1);
        sy = 28 + (s * 37) % (HH - 60) + ((t % 8 < 4) ? 0 : SQ - 1);
        b.bx = BX_W'((sx - 4 + $urandom_range(8)) / BLK);
        b.y  = Y_W'(sy);
        b.mask = (t % 6 == 0) ? 10'h3ff : 10'($urandom);
      end else begin
        b.bx = BX_W'($urandom_range(1, W / BLK - 2));
        b.y  = Y_W'($urandom_range(3, HH - 4));
        b.mask = 10'($urandom);
      end
      e = b;
      for (int k = 0; k < BLK; k++)
        e.mask[k] = b.mask[k] && fast_img(int'(b.bx)*BLK + k, int'(b.y), W, HH);
      if (e.mask != 0) exp_q.push_back(e); else n_drop++;
      n_blocks++;
      @(negedge clk);
      in_valid = 1; in_blk = b;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk) in_valid = 0;
      out_ready = ($urandom_range(1) == 1);
      repeat ($urandom_range(3)) @(negedge clk);
      out_ready = 1;
    end
    repeat (40) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d keypoints missing", exp_q.size()); end
    checks++;
    if (mem.n_cur != 7 * n_blocks) begin failures++; $display("FAIL %0d reads for %0d blocks", mem.n_cur, n_blocks); end
    checks++;
    if (n_kp == 0 || n_drop == 0) begin failures++; $display("FAIL kp=%0d dropped=%0d", n_kp, n_drop); end
    $display("%0d blocks, %0d keypoint blocks, %0d dropped", n_blocks, n_kp, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
