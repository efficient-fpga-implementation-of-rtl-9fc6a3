// hsca_cordic: pipelined rotation-mode CORDIC producing sin(theta) and
// cos(theta) for the particle update.
//
// As in the source design, the vector starts on the positive x axis with
// length K = 0.60725252935 (x0 = K, y0 = 0) and is rotated ITER times by
// +-atan(2^-i): each rotation is a shift and an add (x -= d*y>>i,
// y += d*x>>i, z -= d*atan(2^-i)), with d chosen from the sign of the
// residual angle z. The final x and y are cos(theta) and sin(theta). The
// default of four rotations is the source's; the angle resolution is then
// atan(2^-3), about 0.12 rad, which is enough for the random step direction
// of SCA. ITER up to 16 gives about 1e-4 accuracy in Q16.16.
//
// This design's own additions: one register stage first folds theta, given
// in [0, 2*pi] (the range of r2), into [-pi/2, pi/2] by subtracting pi or
// 2*pi and remembering to negate the results, because the rotation
// sequence converges only for |theta| <= sum(atan(2^-i)). Each rotation is
// one pipeline register, so a new angle is accepted every cycle.
//
// Interface: in_valid/theta (Q16.16 radians), out_valid/sin_o/cos_o
// (Q16.16). Latency LATENCY = ITER + 1 cycles, throughput one per cycle.
module hsca_cordic
  import hsca_pkg::*;
#(
  parameter int unsigned ITER = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pos_t theta,
  output logic out_valid,
  output pos_t sin_o,
  output pos_t cos_o
);

  localparam int unsigned LATENCY = ITER + 1;

  // atan(2^-i) * 2^16, i = 0..15
  localparam pos_t ATAN [16] = '{
    32'sd51472, 32'sd30386, 32'sd16055, 32'sd8150, 32'sd4091, 32'sd2047,
    32'sd1024,  32'sd512,   32'sd256,   32'sd128,  32'sd64,   32'sd32,
    32'sd16,    32'sd8,     32'sd4,     32'sd2 };

  if (ITER < 1 || ITER > 16) begin : g_bad_iter
    $error("hsca_cordic: ITER must be 1..16");
  end

  pos_t x [ITER+1];
  pos_t y [ITER+1];
  pos_t z [ITER+1];
  logic neg [ITER+1];
  logic vld [ITER+1];

  // Stage 0: quadrant folding.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld[0] <= 1'b0;
      x[0]   <= '0;
      y[0]   <= '0;
      z[0]   <= '0;
      neg[0] <= 1'b0;
    end else begin
      vld[0] <= in_valid;
      x[0]   <= Q_CORDIC_K;
      y[0]   <= '0;
      if (theta >= Q_3HALF_PI) begin
        z[0]   <= theta - Q_TWO_PI;
        neg[0] <= 1'b0;
      end else if (theta > Q_HALF_PI) begin
        z[0]   <= theta - Q_PI;
        neg[0] <= 1'b1;
      end else begin
        z[0]   <= theta;
        neg[0] <= 1'b0;
      end
    end
  end

  // Stages 1..ITER: one micro-rotation each.
  for (genvar i = 0; i < ITER; i++) begin : g_rot
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[i+1] <= 1'b0;
        x[i+1]   <= '0;
        y[i+1]   <= '0;
        z[i+1]   <= '0;
        neg[i+1] <= 1'b0;
      end else begin
        vld[i+1] <= vld[i];
        neg[i+1] <= neg[i];
        if (!z[i][POS_W-1]) begin        // residual angle >= 0: rotate counter-clockwise
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - ATAN[i];
        end else begin                   // residual angle < 0: rotate clockwise
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + ATAN[i];
        end
      end
    end
  end

  assign out_valid = vld[ITER];
  assign cos_o     = neg[ITER] ? -x[ITER] : x[ITER];
  assign sin_o     = neg[ITER] ? -y[ITER] : y[ITER];

endmodule
