// tb_kp_fifo: random pushes and pops against a queue model; checks order,
// the full flag (back-pressure) and the empty flag.
module tb_kp_fifo;
  import feat_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  blk_kp_t in_data, out_data;
  logic [4:0] count;
  blk_kp_t model [$];
  int checks = 0, failures = 0, n_full = 0;
  bit pop, push;
  always #5 clk = ~clk;

  kp_fifo #(.DEPTH(16), .T(blk_kp_t)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .count);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(99) < ((t / 1000) % 2 ? 30 : 70));
      out_ready = ($urandom_range(99) < ((t / 1000) % 2 ? 70 : 30));
      in_data   = blk_kp_t'($urandom);
      #1;
      checks++;
      if (in_ready !== (model.size() < 16) || out_valid !== (model.size() > 0)) begin
        failures++; $display("FAIL flags size=%0d", model.size());
      end
      if (model.size() == 16) n_full++;
      pop  = out_valid && out_ready;
      push = in_valid && in_ready;
      if (pop) begin
        checks++;
        if (out_data !== model[0]) begin failures++; $display("FAIL data"); end
      end
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(in_data);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
