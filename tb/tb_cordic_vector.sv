// tb_cordic_vector: self-checking test of the vectoring CORDIC at its default
// parameters. It streams corner vectors (the four axes, full-scale negative
// values, all four quadrants) and random vectors of magnitude 64 or more, with
// random gaps in in_valid, and compares every angle with atan2 computed in
// real arithmetic (tolerance 1.5 mrad plus a truncation term that grows for short
// vectors, compared modulo 2*pi). It
// also checks that each result arrives exactly 7 cycles after its sample
// (1 pre-rotation register + 12 iterations with a register every second one)
// and counts how often the left-half-plane pre-rotation was exercised.
module tb_cordic_vector;
  localparam int    DATA_W = 12;
  localparam int    FRAC   = 12;
  localparam int    LAT    = 7;
  localparam real   PI     = 3.14159265358979;
  localparam real   SCALE  = 4096.0;
  // Tolerance in radians: 1.5 mrad of residual angle after 12 iterations
  // plus one internal LSB (1/16 input LSB) of truncation per iteration,
  // relative to the vector magnitude.
  function automatic real tol_for(int x, int y);
    return 0.0015 + 12.0 / (16.0 * $sqrt(real'(x * x + y * y)));
  endfunction

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DATA_W-1:0] x_in = '0, y_in = '0;
  logic out_valid;
  logic signed [FRAC+3:0] angle;

  cordic_vector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, n_left = 0;
  real exp_q[$];
  real tol_q[$];
  int  t_q[$];

  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int x, int y);
    @(negedge clk);
    x_in = DATA_W'(x);
    y_in = DATA_W'(y);
    in_valid = 1'b1;
    exp_q.push_back($atan2(real'(y), real'(x)));
    tol_q.push_back(tol_for(x, y));
    t_q.push_back(cycle);
    if (x < 0) n_left++;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // Compare on the output side.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real e, got, d, tol;
      int t;
      e = exp_q.pop_front();
      tol = tol_q.pop_front();
      t = t_q.pop_front();
      got = real'(angle) / SCALE;
      d = got - e;
      if (d > PI) d -= 2.0 * PI;
      if (d < -PI) d += 2.0 * PI;
      checks++;
      if (d > tol || d < -tol) begin
        failures++;
        $display("angle mismatch: got %f expected %f", got, e);
      end
      checks++;
      if (cycle - t != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cycle - t, LAT);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(2047, 0);     send(0, 2047);    send(-2048, 0);   send(0, -2048);
    send(-2048, -1);   send(-2048, 1);   send(-2048, -2048); send(2047, 2047);
    send(-1000, 700);  send(-700, -1000); send(1000, -700); send(100, 3);
    for (int k = 0; k < 3000; k++) begin
      int x, y;
      do begin
        x = int'($urandom_range(4095)) - 2048;
        y = int'($urandom_range(4095)) - 2048;
      end while (x * x + y * y < 64 * 64);
      if ($urandom_range(3) == 0) begin
        // back-to-back samples without the gap of send()
        @(negedge clk);
        x_in = DATA_W'(x); y_in = DATA_W'(y); in_valid = 1'b1;
        exp_q.push_back($atan2(real'(y), real'(x)));
        tol_q.push_back(tol_for(x, y));
        t_q.push_back(cycle);
        if (x < 0) n_left++;
      end else begin
        send(x, y);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    checks++;
    if (n_left == 0) begin
      failures++;
      $display("left half-plane pre-rotation never exercised");
    end
    $display("left-half-plane samples: %0d", n_left);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
