// fast_corner: FAST 9-16 corner test of one pixel (purely combinational).
//
// The centre pixel plus THRESH is compared (>=) with each of the 16 pixels on
// the radius-3 Bresenham circle; every run of ARC contiguous circle positions
// (with wrap-around) is ANDed and the 16 runs are ORed into is_kp. The same is
// done for the darker side (pixel + THRESH <= centre). The >= comparators,
// the threshold of 30, the 9-input ANDs and the 16-input OR follow the
// published detector figure; the darker side follows the text ("brighter or
// darker"), and its exact comparison is this design's choice.
//
// circle[0] is the pixel 3 above the centre; the index runs clockwise.
module fast_corner #(
  parameter int THRESH = 30,
  parameter int ARC    = 9
) (
  input  logic [7:0] center,
  input  logic [7:0] circle [16],
  output logic       is_kp
);
  logic [15:0] brighter, darker, run_b, run_d;

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      brighter[i] = ({1'b0, circle[i]} >= ({1'b0, center} + 9'(THRESH)));
      darker[i]   = (({1'b0, circle[i]} + 9'(THRESH)) <= {1'b0, center});
    end
    for (int s = 0; s < 16; s++) begin
      run_b[s] = 1'b1;
      run_d[s] = 1'b1;
      for (int k = 0; k < ARC; k++) begin
        run_b[s] &= brighter[(s + k) % 16];
        run_d[s] &= darker[(s + k) % 16];
      end
    end
    is_kp = (|run_b) | (|run_d);
  end
endmodule
