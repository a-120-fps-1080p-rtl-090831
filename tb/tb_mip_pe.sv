// tb_mip_pe: one PE must register sad_in + |pt - pi| every cycle.
module tb_mip_pe;
  logic clk = 0, rst_n = 0;
  logic [7:0] pt, pi;
  logic [11:0] sad_in, sad_out, exp_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mip_pe #(.SAD_W(12)) dut (.clk, .rst_n, .pt, .pi, .sad_in, .sad_out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pt = 0; pi = 0; sad_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      pt = 8'($urandom); pi = 8'($urandom); sad_in = 12'($urandom_range(2295 - 255));
      if (t < 4) begin pt = 8'(t * 80); pi = 8'(255 - t * 80); end
      exp_q = sad_in + 12'((pt > pi) ? pt - pi : pi - pt);
      @(posedge clk); #1;
      checks++;
      if (sad_out !== exp_q) begin
        failures++;
        $display("FAIL pt=%0d pi=%0d in=%0d got %0d exp %0d", pt, pi, sad_in, sad_out, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
