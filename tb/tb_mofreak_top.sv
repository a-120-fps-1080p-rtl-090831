// tb_mofreak_top: one frame end to end through the whole engine at 640x80.
//
// The frame memory model serves the mask, the current and the previous
// frame over a stalling bus. The expected features are derived from the
// image functions alone: blocks in raster order whose mask is non-empty and
// whose patch lies inside the frame, FAST on their salient pixels, and for
// each keypoint the motion bits and the appearance bits (orientation within
// one step of a real atan2). The testbench also counts the mechanisms of the
// design and fails if one never occurred: blocks dropped by FAST, a full
// keypoint FIFO (back-pressure), both ping-pong banks loaded at once, bus
// contention between readers, and a stalled feature output.
module tb_mofreak_top;
  import feat_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 640, HH = 80, DEN = 61;
  localparam int FIFO_DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic start, mem_req_valid, mem_req_ready, mem_rsp_valid, feat_valid, feat_ready, busy;
  logic [ADDR_W-1:0] mem_req_addr;
  logic [BUS_W-1:0]  mem_rsp_data;
  feature_t feat;
  int checks = 0, failures = 0, cyc = 0, t0, t1;
  int n_feat = 0, n_drop = 0, n_fifo_full = 0, n_pingpong = 0, n_contend = 0, n_stall = 0;
  int exp_x [$], exp_y [$];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mofreak_top #(.IMG_W(W), .IMG_H(HH), .FIFO_DEPTH(FIFO_DEPTH)) dut (
    .clk, .rst_n, .start,
    .mask_base(32'h0100_0000), .cur_base(32'h0200_0000), .prev_base(32'h0300_0000),
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rsp_valid, .mem_rsp_data,
    .feat_valid, .feat_ready, .feat, .busy);
  frame_mem_model #(.IMG_W(W), .IMG_H(HH), .LAT(8), .STALL_PCT(10), .MASK_DEN(DEN)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_addr(mem_req_addr),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.u_fifo.count == FIFO_DEPTH) n_fifo_full++;
    if (dut.u_preload.full == 2'b11) n_pingpong++;
    if ((int'(dut.m_req_valid[0]) + int'(dut.m_req_valid[1]) + int'(dut.m_req_valid[2])) > 1) n_contend++;
    if (feat_valid && !feat_ready) n_stall++;
    if (dut.u_fast.state == 2'd2 && (dut.u_fast.is_kp & dut.u_fast.cur.mask) == 0) n_drop++;
  end

  // checker
  always @(posedge clk) if (rst_n && feat_valid && feat_ready) begin
    cur_patch_t cp;
    prv_patch_t pp;
    int k, ox, oy, ea;
    n_feat++;
    checks++;
    if (exp_x.size() == 0 || int'(feat.x) != exp_x[0] || int'(feat.y) != exp_y[0]) begin
      failures++;
      $display("FAIL feature at (%0d,%0d), expected (%0d,%0d)", feat.x, feat.y,
               exp_x.size() ? exp_x[0] : -1, exp_x.size() ? exp_y[0] : -1);
    end else begin
      k = int'(feat.x) % BLK;
      img_patches(int'(feat.x) / BLK, int'(feat.y), W, HH, cp, pp);
      checks++;
      if (feat.mot !== motion_ref(cp, pp, k)) begin failures++; $display("FAIL motion at x=%0d", feat.x); end
      freak_orient(cp, k, ox, oy);
      ea = atan_ref(ox, oy);
      checks++;
      if (feat.app !== freak_bits(cp, k, ea) && feat.app !== freak_bits(cp, k, (ea + 1) % 256) &&
          feat.app !== freak_bits(cp, k, (ea + 255) % 256)) begin
        failures++; $display("FAIL appearance at x=%0d", feat.x);
      end
    end
    if (exp_x.size()) begin void'(exp_x.pop_front()); void'(exp_y.pop_front()); end
  end

  initial begin
    int n_blk, n_kpblk;
    n_blk = 0; n_kpblk = 0;
    for (int y = CUR_Y0; y + CUR_H - CUR_Y0 <= HH; y++)
      for (int bx = 0; bx < W / BLK; bx++) begin
        bit any;
        if (bx*BLK < CUR_X0 || bx*BLK + CUR_W - CUR_X0 > W) continue;
        any = 0;
        for (int k = 0; k < BLK; k++) any |= mask_bit(bx*BLK + k, y, W, HH, DEN);
        if (any) n_blk++;
        any = 0;
        for (int k = 0; k < BLK; k++)
          if (mask_bit(bx*BLK + k, y, W, HH, DEN) && fast_img(bx*BLK + k, y, W, HH)) begin
            begin exp_x.push_back(bx*BLK + k); exp_y.push_back(y); end
            any = 1;
          end
        if (any) n_kpblk++;
      end
    $display("frame %0dx%0d: %0d salient blocks, %0d keypoints expected", W, HH, n_blk, exp_x.size());
    start = 0; feat_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1; t0 = cyc;
    @(negedge clk) start = 0;
    @(negedge clk);
    while (busy) begin
      @(negedge clk);
      feat_ready = (cyc - t0 < 30000) ? ($urandom_range(63) == 0) : ($urandom_range(3) != 0);
    end
    t1 = cyc;
    checks++;
    if (exp_x.size() != 0) begin failures++; $display("FAIL %0d features missing", exp_x.size()); end
    checks++;
    if (mem.n_mask != W / 128 * HH) begin failures++; $display("FAIL %0d mask reads", mem.n_mask); end
    checks++;
    if (mem.n_cur != 7 * n_blk + 204 * n_kpblk || mem.n_prev != 38 * n_kpblk) begin
      failures++; $display("FAIL reads cur=%0d prev=%0d", mem.n_cur, mem.n_prev);
    end
    $display("%0d cycles, %0d features; dropped %0d, fifo full %0d, ping-pong %0d, contention %0d, output stalls %0d",
             t1 - t0, n_feat, n_drop, n_fifo_full, n_pingpong, n_contend, n_stall);
    checks += 5;
    if (n_drop == 0)      begin failures++; $display("FAIL no block dropped"); end
    if (n_fifo_full == 0) begin failures++; $display("FAIL keypoint FIFO never full"); end
    if (n_pingpong == 0)  begin failures++; $display("FAIL ping-pong banks never both loaded"); end
    if (n_contend == 0)   begin failures++; $display("FAIL no bus contention"); end
    if (n_stall == 0)     begin failures++; $display("FAIL output never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
