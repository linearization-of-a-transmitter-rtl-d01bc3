// cordic_rotate: CORDIC in rotation (circular) mode. It turns the I/Q vector
// (x_in, y_in) by the angle theta and returns the rotated vector at the input
// scale, one sample per clock. In the Cartesian-feedback digital part it
// brings the feedback signal into phase with the direct path.
//
// How it works: a pre-rotation stage folds theta into [-pi/2, pi/2], where
// CORDIC converges: for theta above pi/2 the vector is negated (a rotation by
// pi) and pi is taken off theta; below -pi/2, pi is added. Then ITER
// pseudo-rotations
//   x' = x - d*2^-i*y,  y' = y + d*2^-i*x,  z' = z - d*atan(2^-i)
// drive the residual angle z to zero, d being the sign of z. The
// pseudo-rotations grow the magnitude by 1/K, K = prod cos(atan(2^-i)); a
// final stage multiplies by K (a Q16 constant), rounds, drops the guard bits
// and saturates to DATA_W bits.
//
// The gain correction by the product of cosines follows the rotation
// equations of the design. Register placement (after the pre-rotation, every
// REG_EVERY-th iteration, the last iteration, and the gain stage), guard bits
// and saturation are this design's own choices.
//
// Interface: x_in/y_in signed DATA_W bits; theta a signed radian value with
// ANGLE_FRAC fraction bits in (-pi, pi]. out_valid/x_out/y_out follow in_valid
// by cordic_core_latency(ITER, REG_EVERY) + 1 cycles (8 at the defaults).
// Synchronous active-low reset.
module cordic_rotate
  import cfb_pkg::*;
#(
  parameter int unsigned DATA_W     = 12,
  parameter int unsigned GUARD      = 4,
  parameter int unsigned ITER       = 12,
  parameter int unsigned ANGLE_FRAC = 12,
  parameter int unsigned REG_EVERY  = 2,
  localparam int unsigned ANGLE_W   = ANGLE_FRAC + 4,
  localparam int unsigned XY_W      = DATA_W + GUARD + 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [DATA_W-1:0]  x_in,
  input  logic signed [DATA_W-1:0]  y_in,
  input  logic signed [ANGLE_W-1:0] theta,
  output logic                      out_valid,
  output logic signed [DATA_W-1:0]  x_out,
  output logic signed [DATA_W-1:0]  y_out
);

  localparam logic signed [ANGLE_W-1:0] PI_C      = ANGLE_W'(pi_q(ANGLE_FRAC));
  localparam logic signed [ANGLE_W-1:0] HALF_PI_C = ANGLE_W'(half_pi_q(ANGLE_FRAC));
  localparam int unsigned               KG_W      = 18;
  localparam logic signed [KG_W-1:0]    KGAIN     = KG_W'(kgain_q16(ITER));
  localparam int unsigned               PROD_W    = XY_W + KG_W;
  localparam int unsigned               SHIFT     = 16 + GUARD;

  // Pre-rotation stage outputs.
  logic signed [XY_W-1:0]    x0, y0;
  logic signed [ANGLE_W-1:0] z0;
  logic                      v0;

  logic signed [XY_W-1:0] x_ext, y_ext;
  assign x_ext = XY_W'(x_in) <<< GUARD;
  assign y_ext = XY_W'(y_in) <<< GUARD;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x0 <= '0;
      y0 <= '0;
      z0 <= '0;
      v0 <= 1'b0;
    end else begin
      v0 <= in_valid;
      if (theta > HALF_PI_C) begin
        x0 <= -x_ext;
        y0 <= -y_ext;
        z0 <= theta - PI_C;
      end else if (theta < -HALF_PI_C) begin
        x0 <= -x_ext;
        y0 <= -y_ext;
        z0 <= theta + PI_C;
      end else begin
        x0 <= x_ext;
        y0 <= y_ext;
        z0 <= theta;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_iter
    localparam logic signed [ANGLE_W-1:0] ATAN_I = ANGLE_W'(atan_q(i, ANGLE_FRAC));

    logic signed [XY_W-1:0]    xi, yi, xn, yn, xo, yo;
    logic signed [ANGLE_W-1:0] zi, zn, zo;
    logic                      vi, vo;

    if (i == 0) begin : g_first
      assign xi = x0;
      assign yi = y0;
      assign zi = z0;
      assign vi = v0;
    end else begin : g_next
      assign xi = g_iter[i-1].xo;
      assign yi = g_iter[i-1].yo;
      assign zi = g_iter[i-1].zo;
      assign vi = g_iter[i-1].vo;
    end

    always_comb begin
      if (zi >= 0) begin
        xn = xi - (yi >>> i);
        yn = yi + (xi >>> i);
        zn = zi - ATAN_I;
      end else begin
        xn = xi + (yi >>> i);
        yn = yi - (xi >>> i);
        zn = zi + ATAN_I;
      end
    end

    if (cordic_stage_registered(i, ITER, REG_EVERY)) begin : g_reg
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          xo <= '0;
          yo <= '0;
          zo <= '0;
          vo <= 1'b0;
        end else begin
          xo <= xn;
          yo <= yn;
          zo <= zn;
          vo <= vi;
        end
      end
    end else begin : g_comb
      assign xo = xn;
      assign yo = yn;
      assign zo = zn;
      assign vo = vi;
    end
  end

  // Gain compensation, rounding and saturation.
  function automatic logic signed [DATA_W-1:0] scale_sat(logic signed [XY_W-1:0] v);
    logic signed [PROD_W-1:0] p;
    logic signed [PROD_W-1:0] r;
    p = PROD_W'(v) * PROD_W'(KGAIN);
    r = (p + (PROD_W'(1) <<< (SHIFT - 1))) >>> SHIFT;
    if (r > PROD_W'((2 ** (DATA_W - 1)) - 1))
      return {1'b0, {(DATA_W-1){1'b1}}};
    else if (r < -PROD_W'(2 ** (DATA_W - 1)))
      return {1'b1, {(DATA_W-1){1'b0}}};
    else
      return DATA_W'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_out     <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      x_out     <= scale_sat(g_iter[ITER-1].xo);
      y_out     <= scale_sat(g_iter[ITER-1].yo);
      out_valid <= g_iter[ITER-1].vo;
    end
  end

endmodule
