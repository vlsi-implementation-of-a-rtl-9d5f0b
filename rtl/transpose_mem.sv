// transpose_mem: the 8x8 transposition memory between the row pass and the
// column pass of the 2-D DCT (64 words of 12 bits).
//
// The 1-D DCT delivers a whole row of eight coefficients at once, and the
// column pass needs a whole column of eight at once, so the memory is an
// array of 64 registers written one row per clock and read one column per
// clock. Writing row r stores wr_data[k] at (r, k); reading column c returns
// the words (0..7, c) on rd_data[0..7].
//
// Timing: a write takes effect at the rising edge where wr_en is high; the
// read is combinational from the stored array (a row written at an edge is
// visible to reads in the following cycle). There is no reset: a column is
// read only after all eight rows of the current block have been written.
module transpose_mem #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 12
) (
  input  logic                       clk,
  input  logic                       wr_en,
  input  logic [$clog2(N)-1:0]       wr_row,
  input  logic signed [W-1:0]       wr_data [N],
  input  logic [$clog2(N)-1:0]       rd_col,
  output logic signed [W-1:0]       rd_data [N]
);

  logic signed [W-1:0] mem [N][N];  // mem[row][column]

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem[wr_row] <= wr_data;
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++) rd_data[k] = mem[k][rd_col];
  end

endmodule
