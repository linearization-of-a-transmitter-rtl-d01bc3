// delay_line: fixed-length shift register that delays a bus by DEPTH clock
// cycles. It keeps the direct-path and feedback samples in step with the
// angles coming out of the CORDIC pipelines of the Cartesian-feedback digital
// part. All stages reset to zero (synchronous, active-low reset). DEPTH must
// be at least 1. The delay line is this design's own addition: the samples
// have to wait for the angle computations, which the design implies but does
// not draw.
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] sr [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(DEPTH); k++) sr[k] <= '0;
    end else begin
      sr[0] <= d;
      for (int k = 1; k < int'(DEPTH); k++) sr[k] <= sr[k-1];
    end
  end

  assign q = sr[DEPTH-1];

endmodule
