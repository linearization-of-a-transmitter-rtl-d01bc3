// cordic_vector: CORDIC in vectoring mode. It returns the phase
// atan2(y_in, x_in) of one I/Q sample per clock, as used twice in the
// Cartesian-feedback digital part (direct path and feedback path).
//
// How it works: a pre-rotation stage folds the left half-plane onto the right
// one (x < 0: the vector is negated and the angle accumulator starts at +pi or
// -pi, depending on the sign of y). Then ITER pseudo-rotations by +/-atan(2^-i)
// drive y towards zero; each one only shifts and adds
//   x' = x - d*2^-i*y,  y' = y + d*2^-i*x,  z' = z - d*atan(2^-i)
// with the direction d chosen from the sign of y. The accumulated z is the
// angle. The magnitude gain of the pseudo-rotations does not matter here, as
// only the angle is used.
//
// Pipelining: the iterations are unrolled (a parallel CORDIC). A register
// follows the pre-rotation, every REG_EVERY-th iteration and the last one, so
// REG_EVERY = 1 gives the fully pipelined core and larger values trade clock
// rate for registers. The default of 2 stands for the partly pipelined
// ("mixed") core that the design selects; how that core splits its stages is
// not given, and this split is this design's own choice.
//
// Interface: x_in/y_in are signed DATA_W-bit samples, valid with in_valid.
// angle is a signed radian value with ANGLE_FRAC fraction bits in
// (-pi - eps, pi + eps], where eps is the CORDIC residual of a few LSBs;
// out_valid follows in_valid after cordic_core_latency(ITER, REG_EVERY) cycles
// (7 at the defaults). Synchronous active-low reset clears the pipeline.
module cordic_vector
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
  output logic                      out_valid,
  output logic signed [ANGLE_W-1:0] angle
);

  localparam logic signed [ANGLE_W-1:0] PI_C = ANGLE_W'(pi_q(ANGLE_FRAC));

  // Pre-rotation stage outputs.
  logic signed [XY_W-1:0]    x0, y0;
  logic signed [ANGLE_W-1:0] z0;
  logic                      v0;

  // Pre-rotation into the right half-plane, registered.
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
      if (x_in < 0) begin
        x0 <= -x_ext;
        y0 <= -y_ext;
        z0 <= (y_in >= 0) ? PI_C : -PI_C;
      end else begin
        x0 <= x_ext;
        y0 <= y_ext;
        z0 <= '0;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_iter
    localparam logic signed [ANGLE_W-1:0] ATAN_I = ANGLE_W'(atan_q(i, ANGLE_FRAC));

    logic signed [XY_W-1:0]    xi, yi, xn, yn, xo, yo;
    logic signed [ANGLE_W-1:0] zi, zn, zo;
    logic                      vi, vo;

    // Stage input: the pre-rotation for the first iteration, else the
    // previous iteration's output.
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
      if (yi < 0) begin
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

  assign angle     = g_iter[ITER-1].zo;
  assign out_valid = g_iter[ITER-1].vo;

endmodule
