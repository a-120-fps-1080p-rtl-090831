// kp_fifo: keypoint FIFO between the FAST detector and the image preload.
//
// A synchronous first-in first-out queue of DEPTH entries of type T with
// valid/ready on both sides. It decouples the irregular detection rate from
// the descriptor rate. Data written in a cycle is readable the next cycle.
// A full FIFO deasserts in_ready (back-pressure on the detector). The depth
// is this design's choice; the document does not give it.
module kp_fifo #(
  parameter int  DEPTH = 16,
  parameter type T     = feat_pkg::blk_kp_t
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  T mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;

  assign in_ready  = (count != DEPTH[$bits(count)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + $bits(count)'(do_wr) - $bits(count)'(do_rd);
    end
  end

  always_ff @(posedge clk) if (do_wr) mem[wp] <= in_data;

  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) int'(count) <= DEPTH;
  endproperty
  assert property (p_no_overflow);
endmodule
