// dct2d_top: 8x8 two-dimensional DCT, Y = C X C^T, by the row-column
// method with a single shared 1-D DCT and a 64-word transposition memory.
//
// A block enters as eight rows of eight 12-bit samples (for JPEG, pixels
// already level-shifted to [-128, 127]). Row pass: each row is sent through
// dct1d and its eight coefficients are written as one row of the
// transposition memory. Column pass: once all eight rows are stored, the
// eight input multiplexers switch from the external row input to the
// memory's column read port, and the eight columns are sent through the same
// dct1d; each result is one column of Y and leaves on out_coef. While the
// last columns are still in flight, the rows of the next block may enter.
// The multiplexer-per-lane structure, the shared 1-D unit, the 64 x 12-bit
// memory and the 12-bit word between the passes follow the design
// description; the handshakes, the pass sequencing and taking the output
// directly from the 1-D unit in the column pass are this design's choices.
//
// Interface:
//   in_valid/in_ready/in_row : one row x[r][0..7] per handshake, r = 0..7 in
//                              order.
//   out_valid/out_ready/out_coef/out_col : out_coef[k] = Y[k][out_col];
//                              columns 0..7 in order, held until out_ready.
//   iter_num                 : CORDIC iterations per rotation (11 nominal,
//                              1..11 accepted); change it only between blocks.
// Each 1-D pass of a vector costs 6*iter_num+5 cycles of the shared unit
// with the default two-register CORDIC loop; an 8x8 block therefore takes
// about 16*(6*iter_num+5) cycles (about 1140 cycles at 11 iterations) when
// the output is not stalled. With CORDIC_LOOP_REGS = 1 (one register in the
// CORDIC loop, one micro-rotation per clock) a vector costs 3*iter_num+8
// cycles and a block about 660.
module dct2d_top
  import dct_pkg::*;
#(
  parameter int unsigned DATA_W           = dct_pkg::SAMPLE_W,
  parameter int unsigned FRAC             = 6,
  parameter int unsigned CORDIC_LOOP_REGS = 2   // see cordic_recursive
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [3:0]               iter_num,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_row [DCT_N],
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [DATA_W-1:0] out_coef [DCT_N],
  output logic [2:0]               out_col
);

  localparam int unsigned TAG_W = 4;  // {pass, row or column index}

  typedef enum logic {PH_ROWS, PH_COLS} phase_e;
  phase_e     phase_q;
  logic [3:0] issued_q;     // vectors sent to dct1d in this pass
  logic [3:0] rows_done_q;  // row results written to the memory

  logic                     d_in_valid, d_in_ready;
  logic signed [DATA_W-1:0] d_in_x [DCT_N];
  logic [TAG_W-1:0]         d_in_tag;
  logic                     d_out_valid, d_out_ready;
  logic signed [DATA_W-1:0] d_out_x [DCT_N];
  logic [TAG_W-1:0]         d_out_tag;

  logic signed [DATA_W-1:0] col_data [DCT_N];
  logic                     mem_we;

  // input multiplexers: external row in the row pass, memory column after
  always_comb begin
    for (int k = 0; k < DCT_N; k++)
      d_in_x[k] = (phase_q == PH_COLS) ? col_data[k] : in_row[k];
  end

  assign d_in_valid = (phase_q == PH_ROWS) ? (in_valid && issued_q < 4'd8)
                                           : (issued_q < 4'd8);
  assign in_ready   = (phase_q == PH_ROWS) && d_in_ready && (issued_q < 4'd8);
  assign d_in_tag   = {(phase_q == PH_COLS), issued_q[2:0]};

  dct1d #(
    .DATA_W (DATA_W),
    .FRAC   (FRAC),
    .TAG_W  (TAG_W),
    .CORDIC_LOOP_REGS (CORDIC_LOOP_REGS)
  ) u_dct1d (
    .clk       (clk),
    .rst_n     (rst_n),
    .iter_num  (iter_num),
    .in_valid  (d_in_valid),
    .in_ready  (d_in_ready),
    .in_x      (d_in_x),
    .in_tag    (d_in_tag),
    .out_valid (d_out_valid),
    .out_ready (d_out_ready),
    .out_x     (d_out_x),
    .out_tag   (d_out_tag)
  );

  // row results go to the memory, column results to the output
  assign mem_we      = d_out_valid && !d_out_tag[3];
  assign d_out_ready = d_out_tag[3] ? out_ready : 1'b1;
  assign out_valid   = d_out_valid && d_out_tag[3];
  assign out_col     = d_out_tag[2:0];
  assign out_coef    = d_out_x;

  transpose_mem #(.N(DCT_N), .W(DATA_W)) u_tmem (
    .clk     (clk),
    .wr_en   (mem_we),
    .wr_row  (d_out_tag[2:0]),
    .wr_data (d_out_x),
    .rd_col  (issued_q[2:0]),
    .rd_data (col_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q     <= PH_ROWS;
      issued_q    <= '0;
      rows_done_q <= '0;
    end else begin
      unique case (phase_q)
        PH_ROWS: begin
          if (d_in_valid && d_in_ready) issued_q <= issued_q + 4'd1;
          if (mem_we) rows_done_q <= rows_done_q + 4'd1;
          if (mem_we && rows_done_q == 4'd7) begin
            phase_q     <= PH_COLS;
            issued_q    <= '0;
            rows_done_q <= '0;
          end
        end
        PH_COLS: begin
          if (d_in_ready) begin
            issued_q <= issued_q + 4'd1;
            if (issued_q == 4'd7) begin
              phase_q  <= PH_ROWS;
              issued_q <= '0;
            end
          end
        end
        default: phase_q <= PH_ROWS;
      endcase
    end
  end

  // rows of a block are all issued before their results complete the pass
  a_row_in_row_pass: assert property (@(posedge clk) disable iff (!rst_n)
                                      mem_we |-> (phase_q == PH_ROWS))
    else $error("dct2d_top: row result arrived during the column pass");

endmodule
