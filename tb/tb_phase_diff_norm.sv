// tb_phase_diff_norm: self-checking test of the angle subtraction and
// modulo-2*pi normalisation. Angle pairs are drawn from the range the
// vectoring CORDICs produce (a little beyond +/-pi), including the corner
// pairs that land exactly on +pi and -pi. The expected value is the exact
// difference brought into (-pi, pi] by adding or removing whole multiples of
// 2*pi (pi = 12868 LSB at 12 fraction bits, i.e. round(pi * 4096)). The test
// also checks the one-cycle latency and counts how often each wrap direction
// occurred.
module tb_phase_diff_norm;
  localparam int FRAC   = 12;
  localparam int PI_I   = 12868;
  localparam int TWO_PI = 25736;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [FRAC+3:0] theta_d = '0, theta_fb = '0;
  logic out_valid;
  logic signed [FRAC+3:0] theta;

  phase_diff_norm dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_up = 0, n_down = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int a, int b);
    int e;
    @(negedge clk);
    theta_d = 16'(a);
    theta_fb = 16'(b);
    in_valid = 1'b1;
    e = a - b;
    while (e > PI_I) begin e -= TWO_PI; n_down++; end
    while (e <= -PI_I) begin e += TWO_PI; n_up++; end
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || int'(theta) != e) begin
      failures++;
      $display("a=%0d b=%0d: got %0d valid %0b, expected %0d", a, b, theta, out_valid, e);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    apply(PI_I, -PI_I);        // 2*pi -> 0
    apply(-PI_I, PI_I);        // -2*pi -> 0
    apply(PI_I, 0);            // exactly pi stays
    apply(-PI_I, 0);           // exactly -pi becomes pi
    apply(0, PI_I);            // -pi becomes pi
    apply(PI_I + 4, -PI_I - 4);
    apply(-PI_I - 4, PI_I + 4);
    apply(1000, 999);
    for (int k = 0; k < 2000; k++)
      apply(int'($urandom_range(2 * PI_I + 8)) - PI_I - 4,
            int'($urandom_range(2 * PI_I + 8)) - PI_I - 4);
    checks++;
    if (n_up == 0 || n_down == 0) begin
      failures++;
      $display("a wrap direction was never exercised");
    end
    // Valid must drop one cycle after in_valid does.
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("out_valid stuck high");
    end
    $display("wraps: +2pi %0d, -2pi %0d", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
