// rapid_screen: rapid screening of the binary-mask image.
//
// The mask holds one bit per pixel (1 = salient point), so one 128-bit bus
// word covers 128 pixels and a 1920x1080 frame is read in 16,200 words
// instead of the 129,600 an 8-bit frame would take. Words are read row by
// row into two 1-row buffers (one fills while the other is handed over); a
// complete row is turned in one cycle into a vector with one bit per
// 10-pixel block (the OR of the block's mask bits), restricted to blocks
// whose 64x51 descriptor patch lies inside the frame. The lowest pending
// block is emitted each cycle on the blk_* valid/ready port with its 10-bit
// salient mask. Reading continues while the blocks of a row are emitted, so
// a sparse frame takes about 16,200 cycles plus the memory latency.
//
// Bus: mask address = mask_base + y*IMG_W/8 + 16*word; bit i of a word is
// pixel 128*word+i. The word count per frame follows the document; the
// buffering, the border rule and the block order are this design's choices.
// start begins a frame; done pulses when the last row's blocks are out.
module rapid_screen
  import feat_pkg::*;
#(
  parameter int IMG_W = 1920,
  parameter int IMG_H = 1080
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] mask_base,
  output logic              req_valid,
  input  logic              req_ready,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              rsp_valid,
  input  logic [BUS_W-1:0]  rsp_data,
  output logic              blk_valid,
  input  logic              blk_ready,
  output blk_kp_t           blk,
  output logic              busy,
  output logic              done
);
  localparam int WPR = IMG_W / BUS_W;       // bus words per mask row
  localparam int NB  = IMG_W / BLK;         // blocks per row
  localparam int WW  = $clog2(WPR + 1);
  localparam int BW  = $clog2(NB);

  initial begin
    assert (IMG_W % BUS_W == 0 && IMG_W % BLK == 0)
      else $error("IMG_W must be a multiple of 128 and of 10");
  end

  logic [Y_W-1:0]   req_row, rsp_row, xfer_row, vec_y;
  logic [WW-1:0]    req_word, rsp_word;
  logic [1:0]       own, filled;
  logic [IMG_W-1:0] rowbuf [2];
  logic [IMG_W-1:0] scan_bits;
  logic [NB-1:0]    vec, nonempty;
  logic             running, issue, xfer;
  logic [BW-1:0]    first;
  logic             xb;

  // ---------------- mask reads ----------------
  assign req_valid = running && (req_row < Y_W'(IMG_H)) &&
                     ((req_word != '0) || !own[req_row[0]]);
  assign req_addr  = mask_base + ADDR_W'(req_row) * ADDR_W'(IMG_W / 8)
                               + ADDR_W'(req_word) * ADDR_W'(BUS_B);
  assign issue     = req_valid && req_ready;

  // ---------------- row -> block vector ----------------
  assign xb   = xfer_row[0];
  assign xfer = running && (xfer_row < Y_W'(IMG_H)) && filled[xb] && (vec == '0);

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      nonempty[b] = (|rowbuf[xb][b*BLK +: BLK]) &&
                    (b*BLK >= CUR_X0) && (b*BLK + CUR_W - CUR_X0 <= IMG_W) &&
                    (int'(xfer_row) >= CUR_Y0) && (int'(xfer_row) + CUR_H - CUR_Y0 <= IMG_H);
    end
  end

  always_comb begin
    first = '0;
    for (int b = NB-1; b >= 0; b--) if (vec[b]) first = BW'(b);
  end

  assign blk_valid = (vec != '0);
  assign blk.bx    = BX_W'(first);
  assign blk.y     = vec_y;
  assign blk.mask  = scan_bits[int'(first)*BLK +: BLK];
  assign busy      = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; done <= 1'b0;
      req_row <= '0; req_word <= '0; rsp_row <= '0; rsp_word <= '0;
      xfer_row <= '0; own <= '0; filled <= '0; vec <= '0; vec_y <= '0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        running <= 1'b1;
        req_row <= '0; req_word <= '0; rsp_row <= '0; rsp_word <= '0;
        xfer_row <= '0; own <= '0; filled <= '0; vec <= '0;
      end else if (running) begin
        if (issue) begin
          if (req_word == '0) own[req_row[0]] <= 1'b1;
          if (req_word == WW'(WPR-1)) begin
            req_word <= '0;
            req_row  <= req_row + 1'b1;
          end else req_word <= req_word + 1'b1;
        end
        if (rsp_valid) begin
          if (rsp_word == WW'(WPR-1)) begin
            rsp_word <= '0;
            rsp_row  <= rsp_row + 1'b1;
            filled[rsp_row[0]] <= 1'b1;
          end else rsp_word <= rsp_word + 1'b1;
        end
        if (xfer) begin
          vec        <= nonempty;
          vec_y      <= xfer_row;
          xfer_row   <= xfer_row + 1'b1;
          own[xb]    <= 1'b0;
          filled[xb] <= 1'b0;
        end else if (blk_valid && blk_ready) begin
          vec[first] <= 1'b0;
        end
        if (xfer_row == Y_W'(IMG_H) && vec == '0) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (rsp_valid) rowbuf[rsp_row[0]][int'(rsp_word)*BUS_W +: BUS_W] <= rsp_data;
  always_ff @(posedge clk)
    if (xfer) scan_bits <= rowbuf[xb];
endmodule
