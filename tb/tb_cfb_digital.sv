// tb_cfb_digital: end-to-end test of the Cartesian-feedback digital part at
// its default parameters (the full-size design).
//
// The analog loop is replaced by a simple model: the feedback sample is the
// direct-path sample after a gain g, an AM/AM compression
// |v| -> |v| / (1 + (|v|/A)^2)^0.5 and a phase shift delta, then quantised and
// clipped like a 12-bit ADC code. The test runs segments with different
// (g, delta), covering phase shifts in all four quadrants, and random gaps in
// in_valid. For every sample the expected error I/Q is worked out in real
// arithmetic from the integer inputs: both phases by atan2, their difference,
// the exact rotation of the feedback by it, clipping to 12 bits, and the
// subtraction. Tolerance is 6 LSB per component.
//
// It checks the fixed latency of 17 cycles, and that it is within the
// 183 ns budget of the digital part at a 240 MHz sample clock (at most 43
// cycles). It counts each mechanism of the design and fails if one never
// occurs: left-half-plane pre-rotation in the vectoring CORDICs, the
// modulo-2*pi wrap of the phase difference, the quarter fold of the rotation
// CORDIC, saturation of the rotated feedback, and gaps in the sample stream.
module tb_cfb_digital;
  localparam int  LAT     = 17;
  localparam int  MAX_LAT = 43;   // floor(183 ns * 240 MHz)
  localparam real PI      = 3.14159265358979;
  localparam int  TOL     = 6;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [11:0] i_in = '0, q_in = '0, i_fb = '0, q_fb = '0;
  logic out_valid;
  logic signed [11:0] i_err, q_err;
  logic signed [15:0] phase_err;

  cfb_digital dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_left = 0, n_wrap = 0, n_fold = 0, n_sat = 0, n_gap = 0, n_samples = 0;
  real ei_q[$], eq_q[$];
  int  t_q[$];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
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
      real ei, eq;
      int t;
      ei = ei_q.pop_front();
      eq = eq_q.pop_front();
      t = t_q.pop_front();
      checks++;
      if (real'(i_err) - ei > TOL || ei - real'(i_err) > TOL ||
          real'(q_err) - eq > TOL || eq - real'(q_err) > TOL) begin
        failures++;
        if (failures < 20)
          $display("sample %0d: got (%0d,%0d) expected (%f,%f)",
                   n_samples - ei_q.size(), i_err, q_err, ei, eq);
      end
      checks++;
      if (cycle - t != LAT || cycle - t > MAX_LAT) begin
        failures++;
        $display("latency %0d, expected %0d (budget %0d)", cycle - t, LAT, MAX_LAT);
      end
    end
  end

  // One sample of the direct path and its loop-model feedback.
  task automatic put(int xi, int xq, real g, real delta);
    real m, ph, mc, fbi, fbq, td, tf, th, ri, rq;
    int  fi, fq;
    m  = $sqrt(real'(xi * xi + xq * xq));
    ph = $atan2(real'(xq), real'(xi));
    mc = g * m / $sqrt(1.0 + (m / 2500.0) ** 2);
    fi = clip12(mc * $cos(ph + delta));
    fq = clip12(mc * $sin(ph + delta));
    i_in = 12'(xi); q_in = 12'(xq); i_fb = 12'(fi); q_fb = 12'(fq);
    in_valid = 1'b1;
    n_samples++;
    // Expected error signal.
    td = $atan2(real'(xq), real'(xi));
    tf = $atan2(real'(fq), real'(fi));
    th = td - tf;
    if (xi < 0 || fi < 0) n_left++;
    if (th > PI || th <= -PI) n_wrap++;
    while (th > PI) th -= 2.0 * PI;
    while (th <= -PI) th += 2.0 * PI;
    if (th > PI / 2 || th < -PI / 2) n_fold++;
    ri = real'(fi) * $cos(th) - real'(fq) * $sin(th);
    rq = real'(fi) * $sin(th) + real'(fq) * $cos(th);
    if (ri > 2047.5 || ri < -2048.5 || rq > 2047.5 || rq < -2048.5) n_sat++;
    ei_q.push_back(clipr(real'(xi) - clipr(ri)));
    eq_q.push_back(clipr(real'(xq) - clipr(rq)));
    t_q.push_back(cycle);
  endtask

  real gains[6]  = '{0.5, 0.9, 1.8, 0.7, 1.0, 0.4};
  real deltas[6] = '{0.3, 1.9, -2.6, 3.0, -0.9, -1.7};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Latency of a lone sample.
    @(negedge clk);
    put(1500, 200, 0.8, 0.5);
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    for (int s = 0; s < 6; s++) begin
      for (int k = 0; k < 1500; k++) begin
        real m, ph;
        int xi, xq;
        m  = 150.0 + real'($urandom_range(1850));
        ph = (real'($urandom_range(62831)) / 10000.0) - PI;
        xi = clip12(m * $cos(ph));
        xq = clip12(m * $sin(ph));
        @(negedge clk);
        if ($urandom_range(9) == 0) begin
          in_valid = 1'b0;
          n_gap++;
          @(negedge clk);
        end
        put(xi, xq, gains[s], deltas[s]);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (ei_q.size() != 0) begin
      failures++;
      $display("%0d results missing", ei_q.size());
    end
    $display("samples %0d: left-half-plane %0d, 2pi wraps %0d, quarter folds %0d, saturated %0d, gaps %0d",
             n_samples, n_left, n_wrap, n_fold, n_sat, n_gap);
    checks++; if (n_left == 0) begin failures++; $display("no left-half-plane sample"); end
    checks++; if (n_wrap == 0) begin failures++; $display("no 2pi wrap"); end
    checks++; if (n_fold == 0) begin failures++; $display("no quarter fold"); end
    checks++; if (n_sat == 0)  begin failures++; $display("no saturation"); end
    checks++; if (n_gap == 0)  begin failures++; $display("no gap in the stream"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
