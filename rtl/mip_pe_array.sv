// mip_pe_array: 8 x 9 PE array computing 8 SADs of 3x3 patches in parallel.
//
// Column i (motion direction i) is a chain of N_PIX PEs; row j receives the
// current-frame pixel Pt[j], broadcast to all columns, and the previous-frame
// pixel of direction i at position j. The partial SAD enters column i as 0 at
// the bottom and leaves as SAD_i at the top. The array shape, the broadcast
// of Pt and the 0 inputs follow the published PE-array figure.
//
// Timing: a new 3x3 location can enter every cycle. Row j's inputs are
// delayed j cycles by skew registers (this design's choice), so the SADs of a
// location presented with in_valid in cycle t appear with out_valid in cycle
// t+N_PIX.
module mip_pe_array #(
  parameter int N_DIR = 8,
  parameter int N_PIX = 9,
  parameter int SAD_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [7:0]       pt  [N_PIX],
  input  logic [7:0]       pi  [N_DIR][N_PIX],
  output logic             out_valid,
  output logic [SAD_W-1:0] sad [N_DIR]
);
  // skewed copies: *_d[j][k] is the row-j input delayed k cycles
  logic [7:0]       pt_d [N_PIX][N_PIX];
  logic [7:0]       pi_d [N_DIR][N_PIX][N_PIX];
  logic [SAD_W-1:0] part [N_DIR][N_PIX+1];
  logic [N_PIX-1:0] vpipe;

  always_comb
    for (int j = 0; j < N_PIX; j++) begin
      pt_d[j][0] = pt[j];
      for (int i = 0; i < N_DIR; i++) pi_d[i][j][0] = pi[i][j];
    end

  for (genvar j = 1; j < N_PIX; j++) begin : g_skew
    for (genvar k = 1; k <= j; k++) begin : g_stage
      always_ff @(posedge clk) begin
        pt_d[j][k] <= pt_d[j][k-1];
        for (int i = 0; i < N_DIR; i++) pi_d[i][j][k] <= pi_d[i][j][k-1];
      end
    end
  end

  for (genvar i = 0; i < N_DIR; i++) begin : g_col
    assign part[i][0] = '0;
    for (genvar j = 0; j < N_PIX; j++) begin : g_row
      mip_pe #(.SAD_W(SAD_W)) u_pe (
        .clk, .rst_n,
        .pt(pt_d[j][j]), .pi(pi_d[i][j][j]),
        .sad_in(part[i][j]), .sad_out(part[i][j+1]));
    end
    assign sad[i] = part[i][N_PIX];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[N_PIX-2:0], in_valid};
  assign out_valid = vpipe[N_PIX-1];
endmodule
