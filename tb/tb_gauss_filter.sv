// tb_gauss_filter: feeds random 9x9 windows row by row (back to back and
// with gaps) and compares each result with a direct 2-D binomial sum.
module tb_gauss_filter;
  import tb_ref_pkg::*;
  localparam int H = 4, N = 2*H+1;
  logic clk = 0, rst_n = 0;
  logic seg_valid, val_valid;
  logic [7:0] seg [N];
  logic [7:0] val;
  int checks = 0, failures = 0;
  logic [7:0] exp_q [$];
  always #5 clk = ~clk;

  gauss_filter #(.H(H)) dut (.clk, .rst_n, .seg_valid, .seg, .val_valid, .val);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && val_valid) begin
    checks++;
    if (exp_q.size() == 0 || val !== exp_q[0]) begin
      failures++;
      $display("FAIL got %0d exp %0d", val, exp_q.size() ? exp_q[0] : -1);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  initial begin
    logic [7:0] w [N][N];
    longint s;
    seg_valid = 0;
    for (int i = 0; i < N; i++) seg[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int kind;
      kind = t % 4;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          w[r][c] = (kind == 0) ? 8'hff : (kind == 1) ? ((r == H && c == H) ? 8'd255 : 8'd0) : 8'($urandom);
      s = 0;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) s += longint'(binom(2*H, r)) * binom(2*H, c) * w[r][c];
      exp_q.push_back(8'((s + (longint'(1) << (4*H-1))) >> (4*H)));
      for (int r = 0; r < N; r++) begin
        if ($urandom_range(4) == 0) begin
          @(negedge clk); seg_valid = 0;
          for (int c = 0; c < N; c++) seg[c] = 8'($urandom);
        end
        @(negedge clk);
        seg_valid = 1;
        for (int c = 0; c < N; c++) seg[c] = w[r][c];
      end
      @(negedge clk) seg_valid = 0;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
