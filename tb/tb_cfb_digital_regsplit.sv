// tb_cfb_digital_regsplit: checks the pipelining parameter of the
// Cartesian-feedback digital part. Three copies of cfb_digital run side by
// side on the same random stream: REG_EVERY = 1 (fully pipelined CORDICs),
// the default 2, and 12 (one register per CORDIC core, after its last
// iteration). Register placement must not change the arithmetic, so every
// copy has to produce bit-identical error samples; only the latency differs:
// 2 * (1 + ceil(12 / REG_EVERY)) + 3 cycles, i.e. 29, 17 and 7. The default
// copy's results are also checked against a real-arithmetic reference
// (tolerance 6 LSB) so that identical-but-wrong outputs cannot pass.
module tb_cfb_digital_regsplit;
  localparam int  N   = 3;
  localparam int  RE [N] = '{1, 2, 12};
  localparam real PI  = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [11:0] i_in = '0, q_in = '0, i_fb = '0, q_fb = '0;
  logic        ov [N];
  logic signed [11:0] ie [N];
  logic signed [11:0] qe [N];
  logic signed [15:0] pe [N];

  cfb_digital #(.REG_EVERY(1))  u_re1  (.clk, .rst_n, .in_valid, .i_in, .q_in, .i_fb, .q_fb,
                                        .out_valid(ov[0]), .i_err(ie[0]), .q_err(qe[0]), .phase_err(pe[0]));
  cfb_digital                   u_re2  (.clk, .rst_n, .in_valid, .i_in, .q_in, .i_fb, .q_fb,
                                        .out_valid(ov[1]), .i_err(ie[1]), .q_err(qe[1]), .phase_err(pe[1]));
  cfb_digital #(.REG_EVERY(12)) u_re12 (.clk, .rst_n, .in_valid, .i_in, .q_in, .i_fb, .q_fb,
                                        .out_valid(ov[2]), .i_err(ie[2]), .q_err(qe[2]), .phase_err(pe[2]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int  t_q   [N][$];
  int  out_q [N][$];
  real ri_q[$], rq_q[$];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clipr(real v);
    if (v > 2047.0) return 2047.0;
    if (v < -2048.0) return -2048.0;
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < N; k++) begin
        if (ov[k]) begin
          int exp_lat;
          exp_lat = 2 * (1 + (12 + RE[k] - 1) / RE[k]) + 3;
          checks++;
          if (cycle - t_q[k].pop_front() != exp_lat) begin
            failures++;
            $display("REG_EVERY=%0d: wrong latency", RE[k]);
          end
          out_q[k].push_back({4'b0, ie[k], 4'b0, qe[k]});
        end
      end
      if (ov[1]) begin
        real ei, eq;
        ei = ri_q.pop_front();
        eq = rq_q.pop_front();
        checks++;
        if (real'(ie[1]) - ei > 6.0 || ei - real'(ie[1]) > 6.0 ||
            real'(qe[1]) - eq > 6.0 || eq - real'(qe[1]) > 6.0) begin
          failures++;
          $display("default copy: got (%0d,%0d) expected (%f,%f)", ie[1], qe[1], ei, eq);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int xi, xq, fi, fq;
      real m, ph, th, ri, rq;
      m  = 150.0 + real'($urandom_range(1850));
      ph = (real'($urandom_range(62831)) / 10000.0) - PI;
      xi = int'(m * $cos(ph));
      xq = int'(m * $sin(ph));
      m  = 150.0 + real'($urandom_range(1850));
      ph = (real'($urandom_range(62831)) / 10000.0) - PI;
      fi = int'(m * $cos(ph));
      fq = int'(m * $sin(ph));
      if (fi > 2047) fi = 2047;
      if (fq > 2047) fq = 2047;
      if (xi > 2047) xi = 2047;
      if (xq > 2047) xq = 2047;
      @(negedge clk);
      if ($urandom_range(7) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      i_in = 12'(xi); q_in = 12'(xq); i_fb = 12'(fi); q_fb = 12'(fq);
      in_valid = 1'b1;
      for (int k = 0; k < N; k++) t_q[k].push_back(cycle);
      th = $atan2(real'(xq), real'(xi)) - $atan2(real'(fq), real'(fi));
      ri = real'(fi) * $cos(th) - real'(fq) * $sin(th);
      rq = real'(fi) * $sin(th) + real'(fq) * $cos(th);
      ri_q.push_back(clipr(real'(xi) - clipr(ri)));
      rq_q.push_back(clipr(real'(xq) - clipr(rq)));
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (40) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (out_q[k].size() != 2000) begin
        failures++;
        $display("REG_EVERY=%0d: %0d outputs", RE[k], out_q[k].size());
      end
    end
    for (int j = 0; j < 2000; j++) begin
      checks++;
      if (out_q[0][j] != out_q[1][j] || out_q[2][j] != out_q[1][j]) begin
        failures++;
        if (failures < 10) $display("sample %0d differs between register splits", j);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
