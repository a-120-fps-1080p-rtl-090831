// gauss_filter: separable Gaussian smoothing of one FREAK sampling circle.
//
// The 2-D Gaussian is split into a horizontal and a vertical 1-D pass. Each
// cycle with seg_valid one row segment of 2H+1 pixels enters; it is weighted
// by the binomial coefficients C(2H,i) and summed (horizontal pass), and the
// sum is accumulated with weight C(2H,r) for row r (vertical pass). After
// 2H+1 rows the result, normalised by 2^(4H) with rounding, is registered on
// val with val_valid for one cycle. A circle therefore takes 2H+1 cycles and
// circles can follow back to back. One instance serves all circles of a
// pattern layer. The separable structure and one filter per layer follow the
// document; the binomial kernel (an integer approximation of the Gaussian
// with sigma = sqrt(H/2)) and the row-serial schedule are this design's.
module gauss_filter #(
  parameter int H = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       seg_valid,
  input  logic [7:0] seg [2*H+1],
  output logic       val_valid,
  output logic [7:0] val
);
  localparam int N = 2*H + 1;

  function automatic int binom(int n, int k);
    int r;
    r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  logic [31:0] hsum, acc, total;
  logic [$clog2(N+1)-1:0] row;
  logic [31:0] wrow;
  logic [15:0] coef [N];

  for (genvar i = 0; i < N; i++) begin : g_coef
    assign coef[i] = 16'(binom(2*H, i));
  end

  always_comb begin
    hsum = '0;
    for (int i = 0; i < N; i++) hsum += 32'(coef[i]) * 32'(seg[i]);
    wrow = (int'(row) < N) ? 32'(coef[row]) : 32'd0;
    total = acc + wrow * hsum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0; acc <= '0; val_valid <= 1'b0; val <= '0;
    end else begin
      val_valid <= 1'b0;
      if (seg_valid) begin
        if (int'(row) == N-1) begin
          row       <= '0;
          acc       <= '0;
          val       <= 8'((total + (32'd1 << (4*H-1))) >> (4*H));
          val_valid <= 1'b1;
        end else begin
          row <= row + 1'b1;
          acc <= total;
        end
      end
    end
  end
endmodule
