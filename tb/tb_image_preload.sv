// tb_image_preload: loads 6 blocks through the ping-pong buffer while the
// reader holds each bank for a random time; checks every patch pixel
// against the test images, 204 + 38 reads per block, the load time of a
// block (242 words + latency), and that a second bank was filled while the
// first was being read (overlap of loading and description).
module tb_image_preload;
  import feat_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 640, HH = 80, NBLK = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, req_valid, req_ready, rsp_valid, bank_valid, bank_release;
  logic [ADDR_W-1:0] req_addr;
  logic [BUS_W-1:0]  rsp_data;
  blk_kp_t in_blk, bank_blk;
  logic [7:0] cur_patch [CUR_H][CUR_W];
  logic [7:0] prv_patch [PRV_H][PRV_W];
  blk_kp_t sent [$];
  int checks = 0, failures = 0, overlap = 0, cyc = 0, t_acc;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  image_preload #(.IMG_W(W)) dut (.clk, .rst_n, .cur_base(32'h0200_0000), .prev_base(32'h0300_0000),
    .in_valid, .in_ready, .in_blk, .req_valid, .req_ready, .req_addr, .rsp_valid, .rsp_data,
    .bank_valid, .bank_blk, .cur_patch, .prv_patch, .bank_release);
  frame_mem_model #(.IMG_W(W), .IMG_H(HH), .LAT(5), .STALL_PCT(0)) mem (
    .clk, .rst_n, .req_valid, .req_ready, .req_addr, .rsp_valid, .rsp_data);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // producer
  initial begin
    in_valid = 0; in_blk = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NBLK; n++) begin
      blk_kp_t b;
      b.bx = BX_W'($urandom_range(3, W / BLK - 7));
      b.y  = Y_W'($urandom_range(CUR_Y0, HH - 1 - (CUR_H - 1 - CUR_Y0)));
      b.mask = 10'($urandom);
      @(negedge clk);
      in_valid = 1; in_blk = b;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      sent.push_back(b);
      if (n == 0) t_acc = cyc;
      @(negedge clk) in_valid = 0;
    end
  end

  // reader: hold each bank, then release it
  initial begin
    cur_patch_t ecp;
    prv_patch_t epp;
    bank_release = 0;
    for (int n = 0; n < NBLK; n++) begin
      @(negedge clk);
      while (!bank_valid) @(negedge clk);
      if (n == 0) begin
        checks++;
        if (cyc - t_acc > 242 + 5 + 4) begin failures++; $display("FAIL load took %0d cycles", cyc - t_acc); end
      end
      checks++;
      if (sent.size() == 0 || bank_blk !== sent[0]) begin failures++; $display("FAIL bank block"); end
      img_patches(int'(sent[0].bx), int'(sent[0].y), W, HH, ecp, epp);
      void'(sent.pop_front());
      repeat ($urandom_range(100, 400)) begin
        @(negedge clk);
        if (dut.full == 2'b11) overlap++;
      end
      for (int r = 0; r < CUR_H; r++)
        for (int c = 0; c < CUR_W; c++) begin
          checks++;
          if (cur_patch[r][c] !== ecp[r][c]) begin
            failures++;
            if (failures < 10) $display("FAIL cur[%0d][%0d] got %0d exp %0d", r, c, cur_patch[r][c], ecp[r][c]);
          end
        end
      for (int r = 0; r < PRV_H; r++)
        for (int c = 0; c < PRV_W; c++) begin
          checks++;
          if (prv_patch[r][c] !== epp[r][c]) begin
            failures++;
            if (failures < 10) $display("FAIL prv[%0d][%0d] got %0d exp %0d", r, c, prv_patch[r][c], epp[r][c]);
          end
        end
      bank_release = 1;
      @(negedge clk) bank_release = 0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (mem.n_cur != 204 * NBLK || mem.n_prev != 38 * NBLK) begin
      failures++; $display("FAIL reads cur=%0d prev=%0d", mem.n_cur, mem.n_prev);
    end
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL no ping-pong overlap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
