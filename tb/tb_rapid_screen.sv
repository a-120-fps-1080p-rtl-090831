// tb_rapid_screen: screens a 640x80 mask frame from the memory model and
// compares the emitted blocks (order, row, column, salient mask) with a scan
// of the mask function; checks one read per 128 mask pixels and that the
// frame takes no more than words + 64 cycles with a stalling consumer.
module tb_rapid_screen;
  import feat_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 640, HH = 80, DEN = 97;
  logic clk = 0, rst_n = 0;
  logic start, req_valid, req_ready, rsp_valid, blk_valid, blk_ready, busy, done;
  logic [ADDR_W-1:0] req_addr;
  logic [BUS_W-1:0]  rsp_data;
  blk_kp_t blk;
  blk_kp_t exp_q [$];
  int checks = 0, failures = 0, cyc = 0, t0, t1, n_blk = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  rapid_screen #(.IMG_W(W), .IMG_H(HH)) dut (.clk, .rst_n, .start, .mask_base(32'h0100_0000),
    .req_valid, .req_ready, .req_addr, .rsp_valid, .rsp_data,
    .blk_valid, .blk_ready, .blk, .busy, .done);
  frame_mem_model #(.IMG_W(W), .IMG_H(HH), .LAT(4), .STALL_PCT(0), .MASK_DEN(DEN)) mem (
    .clk, .rst_n, .req_valid, .req_ready, .req_addr, .rsp_valid, .rsp_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && blk_valid && blk_ready) begin
    checks++;
    n_blk++;
    if (exp_q.size() == 0 || blk !== exp_q[0]) begin
      failures++;
      $display("FAIL block bx=%0d y=%0d m=%b", blk.bx, blk.y, blk.mask);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  int bound;
  task automatic expect_frame();
    bound = 64;
    for (int y = 0; y < HH; y++) begin
      int nrow;
      nrow = 0;
      for (int bx = 0; bx < W / BLK; bx++) begin
        blk_kp_t e;
        if (y < CUR_Y0 || y + CUR_H - CUR_Y0 > HH) continue;
        if (bx*BLK < CUR_X0 || bx*BLK + CUR_W - CUR_X0 > W) continue;
        e.bx = BX_W'(bx); e.y = Y_W'(y);
        for (int k = 0; k < BLK; k++) e.mask[k] = mask_bit(bx*BLK + k, y, W, HH, DEN);
        if (e.mask != 0) begin exp_q.push_back(e); nrow++; end
      end
      bound += (nrow + 2 > W / 128) ? nrow + 2 : W / 128;
    end
  endtask

  task automatic run_frame(bit random_ready);
    expect_frame();
    mem.n_mask = 0;
    @(negedge clk) start = 1; t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) begin
      @(negedge clk);
      blk_ready = random_ready ? ($urandom_range(3) != 0) : 1'b1;
    end
    t1 = cyc;
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d blocks missing", exp_q.size()); end
    checks++;
    if (mem.n_mask != W / 128 * HH) begin failures++; $display("FAIL %0d mask reads", mem.n_mask); end
    if (!random_ready) begin
      checks++;
      if (t1 - t0 > bound) begin failures++; $display("FAIL %0d cycles > %0d", t1 - t0, bound); end
    end
    $display("screened in %0d cycles (bound %0d), %0d reads", t1 - t0, bound, mem.n_mask);
  endtask

  initial begin
    start = 0; blk_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(1'b0);
    run_frame(1'b1);
    checks++;
    if (n_blk == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
