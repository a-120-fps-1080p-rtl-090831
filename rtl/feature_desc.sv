// feature_desc: MoFREAK description of all keypoints of a preloaded block.
//
// When the read bank of the image preload holds a block-based keypoint, the
// description patterns slide over its 10 pixel positions from left to right.
// For every position whose keypoint bit is set, the appearance descriptor
// (freak_desc) and the motion descriptor (motion_desc) are started together
// on the same patches; when both are done the 32-byte MoFREAK feature
// {x, y, appearance, motion} is offered on feat_* (valid/ready). After the
// last position bank_release is asserted for one cycle to hand the bank back.
// A keypoint costs about 130 cycles (the appearance descriptor dominates), a
// position without a keypoint one cycle. Sharing one patch set by sliding
// follows the document; the order and the handshakes are this design's.
module feature_desc
  import feat_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bank_valid,
  input  blk_kp_t    bank_blk,
  input  logic [7:0] cur_patch [CUR_H][CUR_W],
  input  logic [7:0] prv_patch [PRV_H][PRV_W],
  output logic       bank_release,
  output logic       feat_valid,
  input  logic       feat_ready,
  output feature_t   feat,
  output logic       busy
);
  typedef enum logic [2:0] {S_IDLE, S_NEXT, S_START, S_RUN, S_OUT, S_REL} state_t;
  state_t state;

  logic [3:0]   k;
  logic         go, app_done, mot_done, app_seen, mot_seen;
  logic [127:0] app_desc, mot_desc;
  logic [7:0]   app_angle;

  assign go           = (state == S_START);
  assign bank_release = (state == S_REL);
  assign feat_valid   = (state == S_OUT);
  assign busy         = (state != S_IDLE);

  freak_desc u_app (
    .clk, .rst_n, .start(go), .kx(k), .cur_patch,
    .done(app_done), .desc(app_desc), .angle(app_angle));

  motion_desc #(.DISP(4)) u_mot (
    .clk, .rst_n, .start(go), .kx(k), .cur_patch, .prv_patch,
    .done(mot_done), .desc(mot_desc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; k <= '0; app_seen <= 1'b0; mot_seen <= 1'b0; feat <= '0;
    end else begin
      case (state)
        S_IDLE: if (bank_valid) begin
          k     <= '0;
          state <= S_NEXT;
        end
        S_NEXT: begin
          if (int'(k) == BLK) state <= S_REL;
          else if (bank_blk.mask[k]) state <= S_START;
          else k <= k + 1'b1;
        end
        S_START: begin
          app_seen <= 1'b0;
          mot_seen <= 1'b0;
          state    <= S_RUN;
        end
        S_RUN: begin
          if (app_done) begin app_seen <= 1'b1; feat.app <= app_desc; end
          if (mot_done) begin mot_seen <= 1'b1; feat.mot <= mot_desc; end
          if ((app_seen || app_done) && (mot_seen || mot_done)) begin
            feat.x <= X_W'(int'(bank_blk.bx) * BLK + int'(k));
            feat.y <= bank_blk.y;
            state  <= S_OUT;
          end
        end
        S_OUT: if (feat_ready) begin
          k     <= k + 1'b1;
          state <= S_NEXT;
        end
        S_REL: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
