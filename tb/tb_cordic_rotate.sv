// tb_cordic_rotate: self-checking test of the rotation CORDIC at its default
// parameters. Vectors and angles in (-pi, pi] are applied, partly back to
// back; the expected output is the exact rotation computed in real arithmetic
// and clipped to the 12-bit range. Tolerance is 3 LSB per component. The test
// checks the 8-cycle latency (pre-rotation register, 6 iteration registers,
// gain stage) and counts the quarter folds (|theta| > pi/2) and the
// saturated results.
module tb_cordic_rotate;
  localparam int  DATA_W = 12;
  localparam int  FRAC   = 12;
  localparam int  LAT    = 8;
  localparam real PI     = 3.14159265358979;
  localparam int  PI_I   = 12868;
  localparam int  TOL    = 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DATA_W-1:0] x_in = '0, y_in = '0;
  logic signed [FRAC+3:0] theta = '0;
  logic out_valid;
  logic signed [DATA_W-1:0] x_out, y_out;

  cordic_rotate dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, n_fold = 0, n_sat = 0;
  real ex_q[$], ey_q[$];
  int  t_q[$];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clip(real v);
    if (v > 2047.0) return 2047.0;
    if (v < -2048.0) return -2048.0;
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real ex, ey;
      int t;
      ex = ex_q.pop_front();
      ey = ey_q.pop_front();
      t = t_q.pop_front();
      checks++;
      if (real'(x_out) - ex > TOL || ex - real'(x_out) > TOL ||
          real'(y_out) - ey > TOL || ey - real'(y_out) > TOL) begin
        failures++;
        $display("got (%0d,%0d) expected (%f,%f)", x_out, y_out, ex, ey);
      end
      checks++;
      if (cycle - t != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cycle - t, LAT);
      end
    end
  end

  task automatic put(int x, int y, int th);
    real a, rx, ry;
    x_in = DATA_W'(x);
    y_in = DATA_W'(y);
    theta = 16'(th);
    in_valid = 1'b1;
    a = real'(th) / 4096.0;
    rx = real'(x) * $cos(a) - real'(y) * $sin(a);
    ry = real'(x) * $sin(a) + real'(y) * $cos(a);
    if (rx > 2047.5 || rx < -2048.5 || ry > 2047.5 || ry < -2048.5) n_sat++;
    ex_q.push_back(clip(rx));
    ey_q.push_back(clip(ry));
    t_q.push_back(cycle);
    if (th > PI_I / 2 || th < -PI_I / 2) n_fold++;
  endtask

  task automatic send(int x, int y, int th);
    @(negedge clk);
    put(x, y, th);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(1000, 0, PI_I);            // rotate by pi
    send(1000, 0, PI_I / 2);        // by pi/2
    send(0, 1000, -PI_I / 2);
    send(700, -300, -PI_I + 1);
    send(2047, 2047, 3217);         // pi/4: |v| = 2895 saturates on y
    send(-2048, -2048, 0);
    send(1200, 900, 0);
    for (int k = 0; k < 3000; k++) begin
      int x, y, th;
      x = int'($urandom_range(4095)) - 2048;
      y = int'($urandom_range(4095)) - 2048;
      th = int'($urandom_range(2 * PI_I - 1)) - PI_I + 1;
      if ($urandom_range(2) == 0) begin
        @(negedge clk);
        put(x, y, th);
      end else begin
        send(x, y, th);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (ex_q.size() != 0) begin
      failures++;
      $display("%0d results missing", ex_q.size());
    end
    checks++;
    if (n_fold == 0 || n_sat == 0) begin
      failures++;
      $display("quarter fold or saturation never exercised");
    end
    $display("quarter folds: %0d, saturated results: %0d", n_fold, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
