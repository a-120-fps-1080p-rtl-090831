// mip_pe: one processing element of the motion descriptor's SAD array.
//
// Two subtractors form pt-pi and pi-pt; the comparison pt>pi selects the
// non-negative one (|pt-pi|), which is added to the partial SAD arriving from
// the PE below. The sum is registered, so a column of 9 PEs accumulates the
// SAD of a 3x3 patch one row per cycle. Subtractors, mux with select pt>pi,
// adder, D register and the 12-bit SAD width follow the published PE figure;
// placing the register on the PE output is this design's reading of it.
module mip_pe #(
  parameter int SAD_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       pt,
  input  logic [7:0]       pi,
  input  logic [SAD_W-1:0] sad_in,
  output logic [SAD_W-1:0] sad_out
);
  logic [7:0] d_tp, d_pt, absd;
  assign d_tp = pt - pi;
  assign d_pt = pi - pt;
  assign absd = (pt > pi) ? d_tp : d_pt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sad_out <= '0;
    else        sad_out <= sad_in + SAD_W'(absd);
endmodule
