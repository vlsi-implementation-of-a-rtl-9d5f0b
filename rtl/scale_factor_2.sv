// scale_factor_2: multiplies a signed fixed-point value by 1/3.1694 using
// only shifts and adders.
//
// The constant is approximated as 2^-2 + 2^-4 + 2^-9 + 2^-10 (0.315430
// against 0.315517), the four-term shift-add form of the design. The first
// two terms are added in front of a pipeline register, the two short terms
// are registered on their own and the last two adders follow the registers,
// so the unit takes one value per clock with one clock of latency. In the
// 1-D DCT it is the optional compensation of the 3pi/8 rotation that
// produces X2 and X6 (see dct1d, parameter EVEN_SF2).
//
// Interface: in_valid/x enter on a rising edge; out_valid/x_out are valid in
// the following cycle. Shifts are arithmetic and truncate. Reset clears
// out_valid only.
module scale_factor_2 #(
  parameter int unsigned W = 23
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] x_out
);

  logic signed [W-1:0] part_24_q;  // x>>2 + x>>4
  logic signed [W-1:0] part_9_q;   // x>>9
  logic signed [W-1:0] part_10_q;  // x>>10

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    part_24_q <= (x >>> 2) + (x >>> 4);
    part_9_q  <= x >>> 9;
    part_10_q <= x >>> 10;
  end

  assign x_out = part_24_q + part_9_q + part_10_q;

endmodule
