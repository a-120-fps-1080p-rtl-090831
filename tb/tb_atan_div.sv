// tb_atan_div: compares the long-division arctangent with a real-valued
// atan2 rounded to 1/256 turn (off by one allowed only next to a bin
// boundary), covers the axes, the diagonals, zero and all octants, and
// checks the FRAC+3-cycle latency.
module tb_atan_div;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, done;
  logic signed [23:0] x, y;
  logic [7:0] angle;
  int checks = 0, failures = 0, exact = 0;
  always #5 clk = ~clk;

  atan_div #(.IN_W(24), .FRAC(12)) dut (.clk, .rst_n, .start, .x, .y, .done, .angle);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(int xi, int yi);
    int n, e;
    real a, frac;
    @(negedge clk);
    x = 24'(xi); y = 24'(yi); start = 1;
    @(negedge clk) start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    e = atan_ref(xi, yi);
    checks++;
    if (n != 15) begin failures++; $display("FAIL latency %0d", n); end
    checks++;
    if (int'(angle) == e) exact++;
    else begin
      a = (xi == 0 && yi == 0) ? 0.0 : $atan2(real'(yi), real'(xi)) * 256.0 / (2.0 * 3.14159265358979);
      frac = a - $floor(a);
      if (!(ang_dist(int'(angle), e) == 1 && frac > 0.49 && frac < 0.51)) begin
        failures++;
        $display("FAIL x=%0d y=%0d got %0d exp %0d", xi, yi, angle, e);
      end
    end
  endtask

  initial begin
    start = 0; x = 0; y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 0); run(1000, 0); run(0, 1000); run(-1000, 0); run(0, -1000);
    run(500, 500); run(-500, 500); run(-500, -500); run(500, -500);
    for (int t = 0; t < 3000; t++) begin
      int m;
      m = 1 << $urandom_range(20);
      run($signed($urandom_range(2*m)) - m, $signed($urandom_range(2*m)) - m);
    end
    checks++;
    if (exact < checks / 2 - 50) begin failures++; $display("FAIL too few exact results %0d", exact); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
