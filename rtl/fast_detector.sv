// fast_detector: FAST 9-16 detection of a block-based keypoint.
//
// For a block (10 adjacent pixels starting at x0 = 10*bx in row y) coming
// from the rapid screening, the line buffer is filled with a 7-row x
// 16-pixel window of the current frame, rows y-3..y+3 and columns
// x0-3..x0+12: exactly 7 bus words per block. Ten fast_corner instances
// share this window (horizontal sharing), one per block pixel; a pixel is a
// keypoint when it is salient and passes the FAST test. Keypoint packing
// turns the 10 results into one block-based keypoint, which is offered on
// out_* (valid/ready) to the keypoint FIFO; a block without any corner is
// dropped.
//
// Timing: in_ready in IDLE; 7 requests, then one evaluation cycle after the
// 7th response, then the output handshake. The 7-word fetch, the 16-pixel
// circle, the threshold of 30 and the block of 10 follow the document; the
// handshakes and dropping empty blocks are this design's choices.
module fast_detector
  import feat_pkg::*;
#(
  parameter int IMG_W  = 1920,
  parameter int THRESH = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] cur_base,
  input  logic              in_valid,
  output logic              in_ready,
  input  blk_kp_t           in_blk,
  output logic              req_valid,
  input  logic              req_ready,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              rsp_valid,
  input  logic [BUS_W-1:0]  rsp_data,
  output logic              out_valid,
  input  logic              out_ready,
  output blk_kp_t           out_blk
);
  localparam int ROWS = 7;
  localparam int CX [16] = '{ 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3,-3,-3,-2,-1};
  localparam int CY [16] = '{-3,-3,-2,-1, 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3};

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_EVAL, S_OUT} state_t;
  state_t state;

  blk_kp_t         cur;
  logic [2:0]      n_req, n_rsp;
  logic [7:0]      win [ROWS][BUS_B];
  logic [BLK-1:0]  is_kp;
  logic [7:0]      circ [BLK][16];

  assign in_ready  = (state == S_IDLE);
  assign req_valid = (state == S_LOAD) && (n_req != 3'(ROWS));
  assign req_addr  = cur_base
                   + ADDR_W'(int'(cur.y) - 3 + int'(n_req)) * ADDR_W'(IMG_W)
                   + ADDR_W'(int'(cur.bx) * BLK - 3);
  assign out_valid = (state == S_OUT);

  for (genvar k = 0; k < BLK; k++) begin : g_fast
    always_comb
      for (int i = 0; i < 16; i++) circ[k][i] = win[3 + CY[i]][3 + k + CX[i]];
    fast_corner #(.THRESH(THRESH), .ARC(9)) u_fast (
      .center(win[3][3+k]), .circle(circ[k]), .is_kp(is_kp[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; n_req <= '0; n_rsp <= '0; cur <= '0; out_blk <= '0;
    end else begin
      case (state)
        S_IDLE: if (in_valid) begin
          cur   <= in_blk;
          n_req <= '0;
          n_rsp <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (req_valid && req_ready) n_req <= n_req + 1'b1;
          if (rsp_valid) begin
            n_rsp <= n_rsp + 1'b1;
            if (n_rsp == 3'(ROWS-1)) state <= S_EVAL;
          end
        end
        S_EVAL: begin
          out_blk.bx   <= cur.bx;
          out_blk.y    <= cur.y;
          out_blk.mask <= is_kp & cur.mask;
          state        <= ((is_kp & cur.mask) != '0) ? S_OUT : S_IDLE;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (state == S_LOAD && rsp_valid)
      for (int b = 0; b < BUS_B; b++) win[n_rsp][b] <= rsp_data[8*b +: 8];
endmodule
