// iq_subtract: the loop subtractor of the Cartesian feedback. It forms the
// error signal i_d = i_a - i_b, q_d = q_a - q_b between the direct-path
// sample (a) and the phase-aligned feedback sample (b). As in the design, the
// subtraction is an addition of the two's complement of the second operand
// (invert and add one through the carry-in). The DATA_W+1-bit result is
// saturated to DATA_W bits so that the DAC code never wraps; the saturation
// and the one-cycle register are this design's own choices.
//
// Interface: signed DATA_W-bit operands valid with in_valid; i_d/q_d and
// out_valid follow one clock later. Synchronous active-low reset.
module iq_subtract #(
  parameter int unsigned DATA_W = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] i_a,
  input  logic signed [DATA_W-1:0] q_a,
  input  logic signed [DATA_W-1:0] i_b,
  input  logic signed [DATA_W-1:0] q_b,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] i_d,
  output logic signed [DATA_W-1:0] q_d
);

  localparam logic signed [DATA_W:0] MAXV = (DATA_W+1)'((2 ** (DATA_W - 1)) - 1);
  localparam logic signed [DATA_W:0] MINV = -(DATA_W+1)'(2 ** (DATA_W - 1));

  // a + ~b + 1 at DATA_W+1 bits, then saturate.
  function automatic logic signed [DATA_W-1:0] sub_sat(logic signed [DATA_W-1:0] a,
                                                        logic signed [DATA_W-1:0] b);
    logic signed [DATA_W:0] s;
    s = (DATA_W+1)'(a) + ~((DATA_W+1)'(b)) + (DATA_W+1)'(1);
    if (s > MAXV)      return DATA_W'(MAXV);
    else if (s < MINV) return DATA_W'(MINV);
    else               return DATA_W'(s);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_d       <= '0;
      q_d       <= '0;
      out_valid <= 1'b0;
    end else begin
      i_d       <= sub_sat(i_a, i_b);
      q_d       <= sub_sat(q_a, q_b);
      out_valid <= in_valid;
    end
  end

endmodule
