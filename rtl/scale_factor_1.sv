// scale_factor_1: multiplies a signed fixed-point value by 1/(2*sqrt(2))
// using only shifts and adders.
//
// The constant is approximated as 2^-2 + 2^-4 + 2^-5 + 2^-7 + 2^-9
// (0.353516 against 0.353553), the five-term shift-add form of the design.
// The first three terms are summed in front of a pipeline register, the two
// short terms are registered on their own, and the last two adders sit after
// the registers, so the unit accepts one value per clock and returns it one
// clock later. In the 1-D DCT it is shared, one value per cycle, by the
// outputs X0, X4, X1 and X7.
//
// Interface: in_valid/x enter on a rising edge; out_valid/x_out are valid in
// the following cycle. Shifts are arithmetic and truncate toward minus
// infinity (each term loses less than one LSB). Reset clears out_valid only.
module scale_factor_1 #(
  parameter int unsigned W = 23
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] x_out
);

  logic signed [W-1:0] part_245_q;  // x>>2 + x>>4 + x>>5
  logic signed [W-1:0] part_7_q;    // x>>7
  logic signed [W-1:0] part_9_q;    // x>>9

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    part_245_q <= (x >>> 2) + (x >>> 4) + (x >>> 5);
    part_7_q   <= x >>> 7;
    part_9_q   <= x >>> 9;
  end

  assign x_out = part_245_q + part_7_q + part_9_q;

endmodule
