// image_preload: fetches the descriptor patches of a block-based keypoint
// into a ping-pong register array.
//
// For a block keypoint (block start x0 = 10*bx, row y) it reads a 64x51
// current-frame patch, columns x0-25..x0+38 and rows y-25..y+25, in 204 bus
// words (4 per row), then a 32x19 previous-frame patch, columns x0-11..x0+20
// and rows y-9..y+9, in 38 words (2 per row). One current patch serves both
// descriptors, and one set of patches serves all 10 keypoints of the block,
// since the description patterns slide across it.
//
// Two banks are selected by two signals: wsel picks the bank being loaded,
// rsel the bank the descriptors read (cur_patch, prv_patch, bank_blk, valid
// while bank_valid). A new block is accepted as soon as the bank under wsel
// is free, so loading the next block overlaps description of the current one.
// bank_release (one cycle) frees the read bank and flips rsel. Each bank
// holds 242 bus words in registers, one write per response; the patch
// outputs are the read bank's bytes, so they are valid the cycle after the
// last write and stay stable until release. The patch sizes, word counts
// and the ping-pong scheme follow the document; the patch placement around
// the block, the register storage and the handshakes are this design's
// choices.
module image_preload
  import feat_pkg::*;
#(
  parameter int IMG_W = 1920
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] cur_base,
  input  logic [ADDR_W-1:0] prev_base,
  input  logic              in_valid,
  output logic              in_ready,
  input  blk_kp_t           in_blk,
  output logic              req_valid,
  input  logic              req_ready,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              rsp_valid,
  input  logic [BUS_W-1:0]  rsp_data,
  output logic              bank_valid,
  output blk_kp_t           bank_blk,
  output logic [7:0]        cur_patch [CUR_H][CUR_W],
  output logic [7:0]        prv_patch [PRV_H][PRV_W],
  input  logic              bank_release
);
  localparam int CWPR = CUR_W / BUS_B;   // 4 words per current row
  localparam int PWPR = PRV_W / BUS_B;   // 2 words per previous row

  blk_kp_t    blk_mem [2];
  logic [1:0] full;
  logic       wsel, rsel, loading;
  blk_kp_t    lb;                          // block being loaded

  // request and response cursors: phase 0 = current frame, 1 = previous
  logic       q_ph, r_ph, q_done;
  logic [5:0] q_row, r_row;
  logic [1:0] q_col, r_col;
  logic       issue;

  assign in_ready  = !loading && !full[wsel];
  assign req_valid = loading && !q_done;
  assign issue     = req_valid && req_ready;

  always_comb begin
    logic [ADDR_W-1:0] x0;
    x0 = ADDR_W'(int'(lb.bx) * BLK);
    if (!q_ph)
      req_addr = cur_base + ADDR_W'(int'(lb.y) - CUR_Y0 + int'(q_row)) * ADDR_W'(IMG_W)
               + x0 - ADDR_W'(CUR_X0) + ADDR_W'(int'(q_col) * BUS_B);
    else
      req_addr = prev_base + ADDR_W'(int'(lb.y) - PRV_Y0 + int'(q_row)) * ADDR_W'(IMG_W)
               + x0 - ADDR_W'(PRV_X0) + ADDR_W'(int'(q_col) * BUS_B);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wsel <= 1'b0; rsel <= 1'b0; loading <= 1'b0; lb <= '0;
      q_ph <= 1'b0; q_row <= '0; q_col <= '0; q_done <= 1'b0;
      r_ph <= 1'b0; r_row <= '0; r_col <= '0;
      blk_mem[0] <= '0; blk_mem[1] <= '0;
    end else begin
      if (in_valid && in_ready) begin
        loading <= 1'b1;
        lb      <= in_blk;
        q_ph <= 1'b0; q_row <= '0; q_col <= '0; q_done <= 1'b0;
        r_ph <= 1'b0; r_row <= '0; r_col <= '0;
      end
      if (issue) begin
        if (int'(q_col) == (q_ph ? PWPR : CWPR) - 1) begin
          q_col <= '0;
          if (int'(q_row) == (q_ph ? PRV_H : CUR_H) - 1) begin
            q_row <= '0;
            if (q_ph) q_done <= 1'b1;
            q_ph <= 1'b1;
          end else q_row <= q_row + 1'b1;
        end else q_col <= q_col + 1'b1;
      end
      if (loading && rsp_valid) begin
        if (int'(r_col) == (r_ph ? PWPR : CWPR) - 1) begin
          r_col <= '0;
          if (int'(r_row) == (r_ph ? PRV_H : CUR_H) - 1) begin
            r_row <= '0;
            r_ph  <= 1'b1;
            if (r_ph) begin                  // last word of the block
              loading       <= 1'b0;
              full[wsel]    <= 1'b1;
              blk_mem[wsel] <= lb;
              wsel          <= ~wsel;
            end
          end else r_row <= r_row + 1'b1;
        end else r_col <= r_col + 1'b1;
      end
      if (bank_release && full[rsel]) begin
        full[rsel] <= 1'b0;
        rsel       <= ~rsel;
      end
    end
  end

  assign bank_valid = full[rsel];
  assign bank_blk   = blk_mem[rsel];

  // Storage: one register pair (bank 0, bank 1) per bus word, each with its
  // own write enable; the read bank's bytes are selected by rsel.
  for (genvar r = 0; r < CUR_H; r++) begin : g_cur_row
    for (genvar w = 0; w < CWPR; w++) begin : g_cur_word
      logic [BUS_W-1:0] word [2];
      always_ff @(posedge clk)
        if (loading && rsp_valid && !r_ph && int'(r_row) == r && int'(r_col) == w)
          word[wsel] <= rsp_data;
      for (genvar k = 0; k < BUS_B; k++) begin : g_byte
        assign cur_patch[r][w*BUS_B + k] = rsel ? word[1][8*k +: 8] : word[0][8*k +: 8];
      end
    end
  end
  for (genvar r = 0; r < PRV_H; r++) begin : g_prv_row
    for (genvar w = 0; w < PWPR; w++) begin : g_prv_word
      logic [BUS_W-1:0] word [2];
      always_ff @(posedge clk)
        if (loading && rsp_valid && r_ph && int'(r_row) == r && int'(r_col) == w)
          word[wsel] <= rsp_data;
      for (genvar k = 0; k < BUS_B; k++) begin : g_byte
        assign prv_patch[r][w*BUS_B + k] = rsel ? word[1][8*k +: 8] : word[0][8*k +: 8];
      end
    end
  end

  // a bank is never written while the descriptors read it
  assert property (@(posedge clk) disable iff (!rst_n)
                   (loading && rsp_valid) |-> !(full[wsel]));
endmodule
