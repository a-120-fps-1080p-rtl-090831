// motion_desc: MIP-style motion descriptor of one keypoint, using SAD.
//
// At 16 locations around the keypoint (offsets dx, dy in {-3,-1,1,3}) the
// 3x3 patch of the current frame is compared with the 3x3 patches of the
// previous frame displaced by DISP pixels in 8 directions (E, SE, S, SW, W,
// NW, N, NE; y grows downwards). The 8 SADs of a location come from the
// 8 x 9 PE array; one location enters per cycle. Each location gives one
// byte: bit i = SAD_i < SAD_(i+1 mod 8), i.e. which of two neighbouring
// motion directions matches better. Location n fills desc[8n+7:8n].
//
// kx (0..9) is the keypoint's index in the block: the keypoint sits at
// current-patch column 25+kx, row 25, and previous-patch column 11+kx, row 9.
// done pulses 16 + 9 + 1 cycles after start. SAD instead of SSD, 8 motion
// directions, the PE array and the 16-byte result follow the document; the
// locations, displacement and bit encoding are this design's choices.
module motion_desc
  import feat_pkg::*;
#(
  parameter int DISP = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [3:0]   kx,
  input  logic [7:0]   cur_patch [CUR_H][CUR_W],
  input  logic [7:0]   prv_patch [PRV_H][PRV_W],
  output logic         done,
  output logic [127:0] desc
);
  localparam int OFS  [4] = '{-3, -1, 1, 3};
  localparam int DIRX [8] = '{1, 1, 0, -1, -1, -1, 0, 1};
  localparam int DIRY [8] = '{0, 1, 1, 1, 0, -1, -1, -1};

  logic        feeding;
  logic [3:0]  loc_in, loc_out, kx_r;
  logic        arr_valid;
  logic [11:0] sad [8];
  logic [7:0]  pt [9];
  logic [7:0]  pi [8][9];

  always_comb begin
    int cx, cy;
    cx = int'(kx_r) + OFS[loc_in % 4];
    cy = OFS[loc_in / 4];
    for (int j = 0; j < 9; j++) begin
      pt[j] = cur_patch[CUR_Y0 + cy + j/3 - 1][CUR_X0 + cx + j%3 - 1];
      for (int i = 0; i < 8; i++)
        pi[i][j] = prv_patch[PRV_Y0 + cy + DISP*DIRY[i] + j/3 - 1]
                            [PRV_X0 + cx + DISP*DIRX[i] + j%3 - 1];
    end
  end

  mip_pe_array #(.N_DIR(8), .N_PIX(9), .SAD_W(12)) u_array (
    .clk, .rst_n, .in_valid(feeding), .pt, .pi,
    .out_valid(arr_valid), .sad);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feeding <= 1'b0; loc_in <= '0; loc_out <= '0; kx_r <= '0;
      done <= 1'b0; desc <= '0;
    end else begin
      done <= 1'b0;
      if (start && !feeding) begin
        feeding <= 1'b1;
        loc_in  <= '0;
        loc_out <= '0;
        kx_r    <= kx;
      end else if (feeding) begin
        loc_in <= loc_in + 1'b1;
        if (loc_in == 4'd15) feeding <= 1'b0;
      end
      if (arr_valid) begin
        for (int i = 0; i < 8; i++)
          desc[8*loc_out + i] <= (sad[i] < sad[(i+1) % 8]);
        loc_out <= loc_out + 1'b1;
        if (loc_out == 4'd15) done <= 1'b1;
      end
    end
  end
endmodule
