// tb_fast_corner: checks the FAST 9-16 test against a run-length reference,
// with directed arcs of 8, 9 and 16 pixels, the exact threshold edge, a
// wrap-around arc, a darker arc and random circles.
module tb_fast_corner;
  import tb_ref_pkg::*;
  logic [7:0] center;
  logic [7:0] circle [16];
  logic       is_kp;
  int checks = 0, failures = 0;

  fast_corner #(.THRESH(30), .ARC(9)) dut (.center, .circle, .is_kp);

  task automatic check(bit exp, string what);
    #1;
    checks++;
    if (is_kp !== exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, is_kp, exp);
    end
  endtask

  task automatic arc(int start, int len, int c, int v, int bg);
    center = 8'(c);
    for (int i = 0; i < 16; i++) circle[i] = 8'(bg);
    for (int i = 0; i < len; i++) circle[(start + i) % 16] = 8'(v);
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    arc(0, 9, 100, 130, 100);  check(1, "9 brighter at threshold");
    arc(0, 9, 100, 129, 100);  check(0, "9 brighter below threshold");
    arc(3, 8, 100, 200, 100);  check(0, "8 brighter");
    arc(12, 9, 100, 200, 100); check(1, "9 brighter wrapping");
    arc(5, 10, 100, 70, 100);  check(1, "10 darker at threshold");
    arc(5, 10, 100, 71, 100);  check(0, "10 darker below threshold");
    arc(0, 16, 10, 255, 10);   check(1, "all brighter");
    arc(0, 16, 250, 0, 250);   check(1, "all darker");
    arc(0, 0, 128, 0, 128);    check(0, "flat");
    for (int t = 0; t < 3000; t++) begin
      center = 8'($urandom_range(255));
      for (int i = 0; i < 16; i++) circle[i] = 8'($urandom_range(255));
      if (t % 3 == 0) begin                      // bias towards long arcs
        int s, n, v;
        s = $urandom_range(15); n = $urandom_range(6, 12);
        for (int i = 0; i < n; i++) begin
          v = (t % 2) ? int'(center) + 30 + $urandom_range(10) : int'(center) - 30 - $urandom_range(10);
          if (v >= 0 && v <= 255) circle[(s + i) % 16] = 8'(v);
        end
      end
      check(fast_ref(center, circle, 30), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
