// atan_div: arctangent of the keypoint orientation vector by long division.
//
// The orientation (x, y) is folded into the first octant: the smaller
// magnitude is divided by the larger one with a restoring long division that
// uses a single subtractor and produces one quotient bit per cycle
// (FRAC+1 cycles, quotient q = floor(min*2^FRAC/max) <= 2^FRAC). The quotient
// is compared with the 32 tangents of the half-step angles (2k-1)*pi/256,
// which rounds it to one of the 256 equal parts of the full turn, and the
// octant is unfolded from the swap and the two signs. angle is valid with
// the one-cycle done pulse FRAC+3 cycles after start; x = y = 0 gives 0.
// Using a long division instead of cross-multiplication follows the
// document's optimised design; the octant folding and the tangent table
// (computed at elaboration from feat_pkg::sin512) are this design's.
module atan_div
  import feat_pkg::*;
#(
  parameter int IN_W = 24,
  parameter int FRAC = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [IN_W-1:0] x,
  input  logic signed [IN_W-1:0] y,
  output logic                   done,
  output logic [7:0]             angle
);
  typedef enum logic [1:0] {S_IDLE, S_DIV, S_MAP} state_t;
  state_t state;

  logic [FRAC:0]   tanb [1:32];
  for (genvar k = 1; k <= 32; k++) begin : g_tan
    localparam longint S = longint'(sin512(2*k-1));
    localparam longint C = longint'(cos512(2*k-1));
    assign tanb[k] = (FRAC+1)'((S <<< FRAC) / C);
  end

  logic [IN_W-1:0] ax, ay, den;
  logic [IN_W:0]   rem, rem_sub;
  logic [FRAC:0]   q;
  logic [$clog2(FRAC+2)-1:0] bitn;
  logic            swap, xneg, yneg, zero;
  logic [5:0]      j;
  logic [7:0]      a1, a2, a3;

  assign ax = x[IN_W-1] ? IN_W'(-x) : IN_W'(x);
  assign ay = y[IN_W-1] ? IN_W'(-y) : IN_W'(y);
  assign rem_sub = rem - {1'b0, den};

  always_comb begin
    j = '0;
    for (int k = 1; k <= 32; k++) if (q >= tanb[k]) j = j + 1'b1;
    a1 = swap ? 8'(64 - int'(j)) : 8'(j);
    a2 = xneg ? 8'(128 - int'(a1)) : a1;
    a3 = yneg ? 8'(256 - int'(a2)) : a2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; angle <= '0; rem <= '0; den <= '0;
      q <= '0; bitn <= '0; swap <= 1'b0; xneg <= 1'b0; yneg <= 1'b0; zero <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          swap  <= (ay > ax);
          den   <= (ay > ax) ? ay : ax;
          rem   <= {1'b0, ((ay > ax) ? ax : ay)};
          xneg  <= x[IN_W-1];
          yneg  <= y[IN_W-1];
          zero  <= (ax == '0) && (ay == '0);
          q     <= '0;
          bitn  <= $bits(bitn)'(FRAC);
          state <= S_DIV;
        end
        S_DIV: begin
          if (!rem_sub[IN_W]) begin                 // rem >= den
            q[bitn] <= 1'b1;
            rem     <= rem_sub << 1;
          end else rem <= rem << 1;
          if (bitn == '0) state <= S_MAP;
          else            bitn  <= bitn - 1'b1;
        end
        S_MAP: begin
          angle <= zero ? 8'd0 : a3;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
