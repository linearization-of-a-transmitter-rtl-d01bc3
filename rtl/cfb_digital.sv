// cfb_digital: digital phase alignment and subtraction of a mixed
// digital/analog Cartesian-feedback transmitter.
//
// In a Cartesian-feedback loop the PA output is attenuated, demodulated back
// to baseband I/Q and subtracted from the wanted I/Q; the difference drives
// the up-converter, so the loop pre-distorts the PA input and linearises the
// PA. The loop is only stable if the demodulated feedback is in phase with the
// direct path. Here the feedback arrives through ADCs and the error leaves
// through DACs, and the phase alignment and the subtraction are done in
// logic:
//
//   i_in,q_in --> cordic_vector --theta_d--+
//                                          +--> phase_diff_norm --theta--+
//   i_fb,q_fb --> cordic_vector --theta_fb-+                             |
//        |                                                               v
//        +--> delay_line -----------------------------------> cordic_rotate
//                                                                        |
//   i_in,q_in --> delay_line ---------------------> iq_subtract <--------+
//                                                        |
//                                              i_err,q_err (to the DACs)
//
// Both angles are measured with CORDICs in vectoring mode, their difference is
// normalised modulo 2*pi, the feedback vector is turned by that difference
// with a CORDIC in rotation mode, and the aligned feedback is subtracted from
// the (delayed) direct-path sample. This structure is the design's; the delay
// lines, the valid strobe and all register placement are this design's own.
//
// Interface: one sample pair per clock (240 MHz converter rate in the target
// system), signed DATA_W-bit two's complement. out_valid, i_err, q_err follow
// in_valid after LATENCY cycles: 17 at the defaults, i.e. 71 ns at 240 MHz,
// inside the 183 ns the digital part may take in the loop. phase_err is the
// normalised phase difference, brought out for observation, valid
// LATENCY - ROT_LAT - 1 cycles after in_valid. Synchronous active-low reset.
module cfb_digital
  import cfb_pkg::*;
#(
  parameter int unsigned DATA_W     = 12,
  parameter int unsigned GUARD      = 4,
  parameter int unsigned ITER       = 12,
  parameter int unsigned ANGLE_FRAC = 12,
  parameter int unsigned REG_EVERY  = 2,
  localparam int unsigned ANGLE_W   = ANGLE_FRAC + 4,
  localparam int unsigned VEC_LAT   = cordic_core_latency(ITER, REG_EVERY),
  localparam int unsigned NORM_LAT  = 1,
  localparam int unsigned ROT_LAT   = cordic_core_latency(ITER, REG_EVERY) + 1,
  localparam int unsigned SUB_LAT   = 1,
  localparam int unsigned LATENCY   = VEC_LAT + NORM_LAT + ROT_LAT + SUB_LAT
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [DATA_W-1:0]  i_in,
  input  logic signed [DATA_W-1:0]  q_in,
  input  logic signed [DATA_W-1:0]  i_fb,
  input  logic signed [DATA_W-1:0]  q_fb,
  output logic                      out_valid,
  output logic signed [DATA_W-1:0]  i_err,
  output logic signed [DATA_W-1:0]  q_err,
  output logic signed [ANGLE_W-1:0] phase_err
);

  // Phase of the direct path and of the feedback path.
  logic                      vd_valid, vfb_valid;
  logic signed [ANGLE_W-1:0] theta_d, theta_fb;

  cordic_vector #(
    .DATA_W(DATA_W), .GUARD(GUARD), .ITER(ITER),
    .ANGLE_FRAC(ANGLE_FRAC), .REG_EVERY(REG_EVERY)
  ) u_vec_direct (
    .clk, .rst_n, .in_valid,
    .x_in(i_in), .y_in(q_in),
    .out_valid(vd_valid), .angle(theta_d)
  );

  cordic_vector #(
    .DATA_W(DATA_W), .GUARD(GUARD), .ITER(ITER),
    .ANGLE_FRAC(ANGLE_FRAC), .REG_EVERY(REG_EVERY)
  ) u_vec_feedback (
    .clk, .rst_n, .in_valid,
    .x_in(i_fb), .y_in(q_fb),
    .out_valid(vfb_valid), .angle(theta_fb)
  );

  // Phase error, normalised to (-pi, pi].
  logic                      th_valid;
  logic signed [ANGLE_W-1:0] theta;

  phase_diff_norm #(.ANGLE_FRAC(ANGLE_FRAC)) u_norm (
    .clk, .rst_n,
    .in_valid(vd_valid & vfb_valid),
    .theta_d, .theta_fb,
    .out_valid(th_valid), .theta
  );

  assign phase_err = theta;

  // Feedback sample held back until its phase error is known.
  logic signed [DATA_W-1:0] i_fb_d, q_fb_d;

  delay_line #(.WIDTH(2 * DATA_W), .DEPTH(VEC_LAT + NORM_LAT)) u_fb_delay (
    .clk, .rst_n,
    .d({i_fb, q_fb}),
    .q({i_fb_d, q_fb_d})
  );

  // Feedback turned into phase with the direct path.
  logic                     rot_valid;
  logic signed [DATA_W-1:0] i_fb_al, q_fb_al;

  cordic_rotate #(
    .DATA_W(DATA_W), .GUARD(GUARD), .ITER(ITER),
    .ANGLE_FRAC(ANGLE_FRAC), .REG_EVERY(REG_EVERY)
  ) u_rotate (
    .clk, .rst_n,
    .in_valid(th_valid),
    .x_in(i_fb_d), .y_in(q_fb_d), .theta,
    .out_valid(rot_valid), .x_out(i_fb_al), .y_out(q_fb_al)
  );

  // Direct-path sample held back to meet the aligned feedback.
  logic signed [DATA_W-1:0] i_in_d, q_in_d;

  delay_line #(.WIDTH(2 * DATA_W), .DEPTH(VEC_LAT + NORM_LAT + ROT_LAT)) u_in_delay (
    .clk, .rst_n,
    .d({i_in, q_in}),
    .q({i_in_d, q_in_d})
  );

  // Error signal for the DACs.
  iq_subtract #(.DATA_W(DATA_W)) u_sub (
    .clk, .rst_n,
    .in_valid(rot_valid),
    .i_a(i_in_d), .q_a(q_in_d),
    .i_b(i_fb_al), .q_b(q_fb_al),
    .out_valid, .i_d(i_err), .q_d(q_err)
  );

  // Fixed latency: every accepted sample leaves exactly LATENCY cycles later.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> ##LATENCY out_valid)
    else $error("cfb_digital: error sample missing LATENCY cycles after input");

endmodule
