// tb_mip_pe_array: streams a new 3x3 location every cycle (with gaps) and
// checks that the 8 SADs of each location appear exactly 9 cycles later.
module tb_mip_pe_array;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [7:0] pt [9];
  logic [7:0] pi [8][9];
  logic [11:0] sad [8];
  int checks = 0, failures = 0;
  logic [95:0] exp_q [$];
  int t_in [$];
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mip_pe_array #(.N_DIR(8), .N_PIX(9), .SAD_W(12)) dut (.clk, .rst_n, .in_valid, .pt, .pi, .out_valid, .sad);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [95:0] e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = exp_q.pop_front();
      if (cyc - t_in.pop_front() != 9) begin failures++; $display("FAIL latency"); end
      for (int i = 0; i < 8; i++) if (sad[i] != e[12*i +: 12]) begin
        failures++; $display("FAIL sad%0d got %0d exp %0d", i, sad[i], e[12*i +: 12]);
      end
    end
  end

  initial begin
    in_valid = 0;
    for (int j = 0; j < 9; j++) begin pt[j] = 0; for (int i = 0; i < 8; i++) pi[i][j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      for (int j = 0; j < 9; j++) begin
        pt[j] = 8'($urandom);
        for (int i = 0; i < 8; i++) pi[i][j] = (t == 5) ? ~pt[j] : 8'($urandom);
      end
      if (in_valid) begin
        logic [95:0] e;
        for (int i = 0; i < 8; i++) begin
          int acc;
          acc = 0;
          for (int j = 0; j < 9; j++) acc += (pt[j] > pi[i][j]) ? pt[j] - pi[i][j] : pi[i][j] - pt[j];
          e[12*i +: 12] = 12'(acc);
        end
        exp_q.push_back(e);
        t_in.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
