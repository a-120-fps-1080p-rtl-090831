// frame_mem_model: behavioural model of the off-chip frame memory on the
// 128-bit image bus (testbench only, not synthesizable).
//
// Three regions are decoded from address bits 27:24: 1 = binary mask
// (pitch IMG_W/8 bytes), 2 = current frame, 3 = previous frame (pitch IMG_W
// bytes, 8-bit pixels); their contents come from the tb_ref_pkg image
// functions. A request is accepted while rst_n and req_ready are high
// (req_ready is randomly low for STALL_PCT percent of cycles). Each accepted
// read returns 16 bytes starting at its byte address, unaligned allowed, LAT
// cycles later and in order, at most one response per cycle. Reads are
// counted per region. The address map and the latency are the testbench's
// own; the 128-bit bus width follows the architecture.
module frame_mem_model
  import feat_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int IMG_W     = 640,
  parameter int IMG_H     = 80,
  parameter int LAT       = 4,
  parameter int STALL_PCT = 0,
  parameter int MASK_DEN  = 400
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  output logic              rsp_valid,
  output logic [BUS_W-1:0]  rsp_data
);
  int unsigned n_mask, n_cur, n_prev, n_bad;
  longint unsigned cyc;
  longint unsigned q_t [$];
  logic [BUS_W-1:0] q_d [$];

  initial begin
    n_mask = 0; n_cur = 0; n_prev = 0; n_bad = 0; cyc = 0;
    req_ready = 1'b1; rsp_valid = 1'b0; rsp_data = '0;
  end

  function automatic logic [7:0] rd_byte(logic [ADDR_W-1:0] a);
    int o, y, x;
    o = int'(a[23:0]);
    case (a[27:24])
      4'd1: begin
        logic [7:0] b;
        y = o / (IMG_W / 8);
        x = (o % (IMG_W / 8)) * 8;
        for (int i = 0; i < 8; i++) b[i] = mask_bit(x + i, y, IMG_W, IMG_H, MASK_DEN);
        return b;
      end
      4'd2: return cur_pix(o % IMG_W, o / IMG_W, IMG_W, IMG_H);
      4'd3: return prev_pix(o % IMG_W, o / IMG_W, IMG_W, IMG_H);
      default: return 8'hxx;
    endcase
  endfunction

  always @(posedge clk) begin
    logic [BUS_W-1:0] d;
    cyc <= cyc + 1;
    if (rst_n && req_valid && req_ready) begin
      for (int b = 0; b < BUS_B; b++) d[8*b +: 8] = rd_byte(req_addr + ADDR_W'(b));
      case (req_addr[27:24])
        4'd1: n_mask++;
        4'd2: n_cur++;
        4'd3: n_prev++;
        default: n_bad++;
      endcase
      q_t.push_back(cyc + LAT);
      q_d.push_back(d);
    end
    if (q_t.size() > 0 && q_t[0] <= cyc) begin
      rsp_valid <= 1'b1;
      rsp_data  <= q_d.pop_front();
      void'(q_t.pop_front());
    end else rsp_valid <= 1'b0;
    req_ready <= ($urandom_range(99) >= STALL_PCT);
  end
endmodule
