// tb_iq_subtract: self-checking test of the loop subtractor. Random and
// extreme operand pairs are applied back to back; the expected difference is
// computed with integer arithmetic and clipped to [-2048, 2047]. The test
// checks the one-cycle latency and that both saturation directions occur.
module tb_iq_subtract;
  localparam int DATA_W = 12;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DATA_W-1:0] i_a = '0, q_a = '0, i_b = '0, q_b = '0;
  logic out_valid;
  logic signed [DATA_W-1:0] i_d, q_d;

  iq_subtract dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat_hi = 0, n_sat_lo = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(int v);
    if (v > 2047) return 2047;
    if (v < -2048) return -2048;
    return v;
  endfunction

  int ei_q[$], eq_q[$], t_q[$];
  int cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int ei, eq;
      ei = ei_q.pop_front();
      eq = eq_q.pop_front();
      checks++;
      if (cycle - t_q.pop_front() != 1) begin
        failures++;
        $display("latency is not one cycle");
      end
      checks++;
      if (int'(i_d) != ei || int'(q_d) != eq) begin
        failures++;
        $display("got (%0d,%0d) expected (%0d,%0d)", i_d, q_d, ei, eq);
      end
    end
  end

  task automatic apply(int a, int b, int c, int d);
    @(negedge clk);
    i_a = 12'(a); q_a = 12'(b); i_b = 12'(c); q_b = 12'(d);
    in_valid = 1'b1;
    ei_q.push_back(clip(a - c));
    eq_q.push_back(clip(b - d));
    t_q.push_back(cycle);
    if (a - c > 2047 || b - d > 2047) n_sat_hi++;
    if (a - c < -2048 || b - d < -2048) n_sat_lo++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    apply(2047, -2048, -2048, 2047);
    apply(-2048, 0, 1, 0);
    apply(0, 0, -2048, -2048);   // 0 - (-2048) = 2048 saturates
    apply(5, -7, 5, -7);
    for (int k = 0; k < 3000; k++)
      apply(int'($urandom_range(4095)) - 2048, int'($urandom_range(4095)) - 2048,
            int'($urandom_range(4095)) - 2048, int'($urandom_range(4095)) - 2048);
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (ei_q.size() != 0) begin
      failures++;
      $display("%0d results missing (latency is not one cycle)", ei_q.size());
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("saturation not exercised");
    end
    $display("saturations: high %0d, low %0d", n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
