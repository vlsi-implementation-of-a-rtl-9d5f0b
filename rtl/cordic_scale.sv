// cordic_scale: removes the gain of the recursive CORDIC, i.e. multiplies a
// signed fixed-point value by K ~= 0.60725, with shifts and adders only.
//
// The constant is formed as 2^-1 + 2^-3 - 2^-6 = 0.609375, the three-shift
// form of the design's CORDIC scale-factor generator. The sum of the first
// two terms and the 2^-6 term are registered; the subtractor follows the
// registers. One value per clock, one clock of latency. In the 1-D DCT a
// single instance is shared by the six CORDIC outputs of one transform.
//
// Interface: in_valid/x enter on a rising edge; out_valid/x_out are valid in
// the next cycle. Shifts are arithmetic and truncate. Reset clears out_valid.
module cordic_scale #(
  parameter int unsigned W = 23
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] x_out
);

  logic signed [W-1:0] part_13_q;  // x>>1 + x>>3
  logic signed [W-1:0] part_6_q;   // x>>6

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    part_13_q <= (x >>> 1) + (x >>> 3);
    part_6_q  <= x >>> 6;
  end

  assign x_out = part_13_q - part_6_q;

endmodule
