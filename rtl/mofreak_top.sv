// mofreak_top: block-based MoFREAK feature extraction for one video frame.
//
// Two phases run concurrently, decoupled by the keypoint FIFO:
//  * detection: rapid_screen reads the binary-mask frame (1 bit/pixel, 128
//    pixels per bus word) and emits every 10-pixel block holding a salient
//    pixel; fast_detector loads a 7x16 window of the current frame for the
//    block, tests its salient pixels with FAST 9-16 and packs the corners
//    into a block-based keypoint;
//  * description: image_preload loads one 64x51 current and one 32x19
//    previous-frame patch per block into a ping-pong register array, and
//    feature_desc slides the FREAK (appearance) and MIP/SAD (motion)
//    descriptors over the block's keypoints, emitting one 256-bit feature
//    per keypoint.
// All three readers share one 128-bit image bus through bus_arbiter.
//
// Interface: pulse start with the three frame base addresses stable; mem_*
// is a read-only bus (byte addresses, 16 bytes per read, in-order responses,
// unaligned reads allowed); features leave on feat_* (valid/ready); busy
// stays high until the last feature of the frame has left. Layout: 8-bit
// pixels row-major with pitch IMG_W; the mask has pitch IMG_W/8 bytes. The
// partition and sizes follow the document; the bus protocol, the layout and
// the feature stream port are this design's choices.
module mofreak_top
  import feat_pkg::*;
#(
  parameter int IMG_W      = 1920,
  parameter int IMG_H      = 1080,
  parameter int FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] mask_base,
  input  logic [ADDR_W-1:0] cur_base,
  input  logic [ADDR_W-1:0] prev_base,
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic [ADDR_W-1:0] mem_req_addr,
  input  logic              mem_rsp_valid,
  input  logic [BUS_W-1:0]  mem_rsp_data,
  output logic              feat_valid,
  input  logic              feat_ready,
  output feature_t          feat,
  output logic              busy
);
  localparam int NM = 3;   // 0: image preload, 1: FAST line buffer, 2: screening

  logic              m_req_valid [NM];
  logic              m_req_ready [NM];
  logic [ADDR_W-1:0] m_req_addr  [NM];
  logic              m_rsp_valid [NM];
  logic [BUS_W-1:0]  m_rsp_data;

  logic    sc_valid, sc_ready, sc_busy, sc_done;
  blk_kp_t sc_blk;
  logic    fd_valid, fd_ready;
  blk_kp_t fd_blk;
  logic    ff_valid, ff_ready;
  blk_kp_t ff_blk;
  logic [$clog2(FIFO_DEPTH+1)-1:0] ff_count;
  logic    bank_valid, bank_release, fe_busy;
  blk_kp_t bank_blk;
  logic [7:0] cur_patch [CUR_H][CUR_W];
  logic [7:0] prv_patch [PRV_H][PRV_W];

  bus_arbiter #(.N(NM), .OUTST(32), .ADDR_W(ADDR_W), .DATA_W(BUS_W)) u_arb (
    .clk, .rst_n,
    .m_req_valid, .m_req_ready, .m_req_addr, .m_rsp_valid, .m_rsp_data,
    .s_req_valid(mem_req_valid), .s_req_ready(mem_req_ready), .s_req_addr(mem_req_addr),
    .s_rsp_valid(mem_rsp_valid), .s_rsp_data(mem_rsp_data));

  rapid_screen #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_screen (
    .clk, .rst_n, .start, .mask_base,
    .req_valid(m_req_valid[2]), .req_ready(m_req_ready[2]), .req_addr(m_req_addr[2]),
    .rsp_valid(m_rsp_valid[2]), .rsp_data(m_rsp_data),
    .blk_valid(sc_valid), .blk_ready(sc_ready), .blk(sc_blk),
    .busy(sc_busy), .done(sc_done));

  fast_detector #(.IMG_W(IMG_W), .THRESH(30)) u_fast (
    .clk, .rst_n, .cur_base,
    .in_valid(sc_valid), .in_ready(sc_ready), .in_blk(sc_blk),
    .req_valid(m_req_valid[1]), .req_ready(m_req_ready[1]), .req_addr(m_req_addr[1]),
    .rsp_valid(m_rsp_valid[1]), .rsp_data(m_rsp_data),
    .out_valid(fd_valid), .out_ready(fd_ready), .out_blk(fd_blk));

  kp_fifo #(.DEPTH(FIFO_DEPTH), .T(blk_kp_t)) u_fifo (
    .clk, .rst_n,
    .in_valid(fd_valid), .in_ready(fd_ready), .in_data(fd_blk),
    .out_valid(ff_valid), .out_ready(ff_ready), .out_data(ff_blk),
    .count(ff_count));

  image_preload #(.IMG_W(IMG_W)) u_preload (
    .clk, .rst_n, .cur_base, .prev_base,
    .in_valid(ff_valid), .in_ready(ff_ready), .in_blk(ff_blk),
    .req_valid(m_req_valid[0]), .req_ready(m_req_ready[0]), .req_addr(m_req_addr[0]),
    .rsp_valid(m_rsp_valid[0]), .rsp_data(m_rsp_data),
    .bank_valid, .bank_blk, .cur_patch, .prv_patch, .bank_release);

  feature_desc u_desc (
    .clk, .rst_n, .bank_valid, .bank_blk, .cur_patch, .prv_patch,
    .bank_release, .feat_valid, .feat_ready, .feat, .busy(fe_busy));

  assign busy = sc_busy || !sc_ready || (ff_count != '0) || !ff_ready ||
                bank_valid || fe_busy;
endmodule
