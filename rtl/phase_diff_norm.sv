// phase_diff_norm: phase error of the Cartesian-feedback loop. It subtracts
// the feedback-path angle from the direct-path angle,
//   theta = theta_d - theta_fb,
// and brings the result back into (-pi, pi] by successive tests: a difference
// above pi loses 2*pi, one at or below -pi gains 2*pi. Both inputs lie within
// a few LSBs of (-pi, pi], so one test each way is enough.
//
// Interface: theta_d/theta_fb/theta are signed radians with ANGLE_FRAC
// fraction bits (ANGLE_FRAC + 4 bits wide). The result is registered: theta
// and out_valid follow the inputs and in_valid by one clock. Synchronous
// active-low reset. The subtraction and the modulo-2*pi normalisation follow
// the design; the number format and the one-cycle timing are this design's
// own choice.
module phase_diff_norm
  import cfb_pkg::*;
#(
  parameter int unsigned ANGLE_FRAC = 12,
  localparam int unsigned ANGLE_W   = ANGLE_FRAC + 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [ANGLE_W-1:0] theta_d,
  input  logic signed [ANGLE_W-1:0] theta_fb,
  output logic                      out_valid,
  output logic signed [ANGLE_W-1:0] theta
);

  localparam logic signed [ANGLE_W:0] PI_C     = (ANGLE_W+1)'(pi_q(ANGLE_FRAC));
  localparam logic signed [ANGLE_W:0] TWO_PI_C = (ANGLE_W+1)'(two_pi_q(ANGLE_FRAC));

  logic signed [ANGLE_W:0] diff, norm;

  always_comb begin
    diff = (ANGLE_W+1)'(theta_d) - (ANGLE_W+1)'(theta_fb);
    if (diff > PI_C)
      norm = diff - TWO_PI_C;
    else if (diff <= -PI_C)
      norm = diff + TWO_PI_C;
    else
      norm = diff;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      theta     <= '0;
      out_valid <= 1'b0;
    end else begin
      theta     <= ANGLE_W'(norm);
      out_valid <= in_valid;
    end
  end

  // The normalised angle never leaves (-pi, pi].
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid |-> (theta <= ANGLE_W'(pi_q(ANGLE_FRAC))) &&
                                 (theta > -ANGLE_W'(pi_q(ANGLE_FRAC))))
    else $error("phase_diff_norm: angle out of (-pi, pi]");

endmodule
