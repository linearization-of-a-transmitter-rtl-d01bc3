// tb_cfb_wcdma: workload test of the Cartesian-feedback digital part with a
// W-CDMA-like baseband stream at the default parameters.
//
// Stimulus: random QPSK chips on I and Q at 3.84 Mchip/s, sampled at
// 240 MHz (62.5 samples per chip), with raised-cosine transitions between
// chips, peak 1400 LSB per component. The feedback input is the direct-path
// signal after a model of the analog loop: a delay of 18 samples (75 ns, about
// the filter delay of the analog paths), AM/AM compression
// |v| -> |v| / (1 + (|v|/2400)^2)^0.5, AM/PM of 0.25 rad at full compression,
// a fixed loop phase shift of 2.2 rad, 12-bit quantisation and clipping.
// 1024 chips (64000 samples) are streamed without gaps.
//
// Every error sample is compared with a real-arithmetic reference (atan2 of
// both inputs, exact rotation, clipping, subtraction). The tolerance is 6 LSB
// plus the angle error a CORDIC makes on very short vectors, scaled by the
// feedback magnitude; this only matters near the origin crossings of the
// chip transitions. The test also checks that one result leaves per clock and
// reports the worst deviation.
module tb_cfb_wcdma;
  localparam int  LAT    = 17;
  localparam int  NCHIP  = 1024;
  localparam int  DLY    = 18;
  localparam real PI     = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [11:0] i_in = '0, q_in = '0, i_fb = '0, q_fb = '0;
  logic out_valid;
  logic signed [11:0] i_err, q_err;
  logic signed [15:0] phase_err;

  cfb_digital dut (.*);

  always #2 clk = ~clk;

  int checks = 0, failures = 0, n_out = 0, n_in = 0;
  real worst = 0.0;
  real ei_q[$], eq_q[$], tol_q[$];

  initial begin
    repeat (NCHIP * 63 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip12(real v);
    int r;
    r = int'(v);
    if (r > 2047) return 2047;
    if (r < -2048) return -2048;
    return r;
  endfunction

  function automatic real clipr(real v);
    if (v > 2047.0) return 2047.0;
    if (v < -2048.0) return -2048.0;
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real ei, eq, tol, d;
      ei = ei_q.pop_front();
      eq = eq_q.pop_front();
      tol = tol_q.pop_front();
      n_out++;
      d = (real'(i_err) - ei) ** 2 + (real'(q_err) - eq) ** 2;
      d = $sqrt(d);
      if (d > worst) worst = d;
      checks++;
      if (d > tol) begin
        failures++;
        if (failures < 20)
          $display("output %0d: got (%0d,%0d) expected (%f,%f)", n_out, i_err, q_err, ei, eq);
      end
    end
  end

  // Chip streams and the delayed direct path seen by the feedback model.
  int  chip_i [NCHIP + 1];
  int  chip_q [NCHIP + 1];
  real hist_i [DLY + 1];
  real hist_q [DLY + 1];

  initial begin
    for (int c = 0; c <= NCHIP; c++) begin
      chip_i[c] = $urandom_range(1) ? 1400 : -1400;
      chip_q[c] = $urandom_range(1) ? 1400 : -1400;
    end
    for (int k = 0; k <= DLY; k++) begin hist_i[k] = 0.0; hist_q[k] = 0.0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCHIP * 125 / 2; n++) begin
      int  c, xi, xq, fi, fq;
      real fr, w, si, sq, di, dq, m, ph, mc, td, tf, th, ri, rq, mf, mx, tol;
      // Raised-cosine transition between chip c and chip c+1.
      c  = (2 * n) / 125;
      fr = real'(2 * n - 125 * c) / 125.0;
      w  = (1.0 - $cos(PI * fr)) / 2.0;
      si = real'(chip_i[c]) + (real'(chip_i[c + 1]) - real'(chip_i[c])) * w;
      sq = real'(chip_q[c]) + (real'(chip_q[c + 1]) - real'(chip_q[c])) * w;
      xi = clip12(si);
      xq = clip12(sq);
      // Analog loop model on the delayed direct path.
      for (int k = DLY; k > 0; k--) begin hist_i[k] = hist_i[k-1]; hist_q[k] = hist_q[k-1]; end
      hist_i[0] = real'(xi);
      hist_q[0] = real'(xq);
      di = hist_i[DLY];
      dq = hist_q[DLY];
      m  = $sqrt(di * di + dq * dq);
      ph = $atan2(dq, di);
      mc = m / $sqrt(1.0 + (m / 2400.0) ** 2);
      ph = ph + 2.2 + 0.25 * (1.0 - mc / (m + 1.0e-9));
      fi = clip12(mc * $cos(ph));
      fq = clip12(mc * $sin(ph));
      @(negedge clk);
      i_in = 12'(xi); q_in = 12'(xq); i_fb = 12'(fi); q_fb = 12'(fq);
      in_valid = 1'b1;
      n_in++;
      // Reference error sample.
      td = $atan2(real'(xq), real'(xi));
      tf = $atan2(real'(fq), real'(fi));
      th = td - tf;
      ri = real'(fi) * $cos(th) - real'(fq) * $sin(th);
      rq = real'(fi) * $sin(th) + real'(fq) * $cos(th);
      ei_q.push_back(clipr(real'(xi) - clipr(ri)));
      eq_q.push_back(clipr(real'(xq) - clipr(rq)));
      mf = $sqrt(real'(fi * fi + fq * fq));
      mx = $sqrt(real'(xi * xi + xq * xq));
      // 6 LSB, plus |fb| times the CORDIC angle error on short vectors
      // (about 1.5 mrad + 0.75 / |v| for each of the two measured angles).
      tol = 6.0 + mf * (0.003 + 0.75 / (mx + 1.0) + 0.75 / (mf + 1.0));
      tol_q.push_back(tol);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (n_out != n_in) begin
      failures++;
      $display("%0d inputs but %0d outputs", n_in, n_out);
    end
    $display("samples %0d, worst deviation %f LSB", n_out, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
