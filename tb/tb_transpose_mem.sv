// tb_transpose_mem: self-checking test of the 8x8 transposition memory.
//
// Several random 8x8 blocks are written one row per clock; every column is
// then read and compared with the transpose kept in the testbench. A row
// rewritten between reads must show up in the next column read, and a clock
// with wr_en low must leave the contents untouched.
module tb_transpose_mem;
  localparam int unsigned N = 8;
  localparam int unsigned W = 12;

  logic                       clk = 1'b0;
  logic                       wr_en = 1'b0;
  logic [$clog2(N)-1:0]       wr_row = '0;
  logic signed [W-1:0]        wr_data [N];
  logic [$clog2(N)-1:0]       rd_col = '0;
  logic signed [W-1:0]        rd_data [N];

  logic signed [W-1:0]        model [N][N];
  int checks = 0, failures = 0;

  transpose_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus is applied with blocking assignments at the falling edge and
  // takes effect at the next rising edge.
  task automatic write_row(int r);
    wr_en  = 1'b1;
    wr_row = r[2:0];
    for (int k = 0; k < N; k++) begin
      logic signed [W-1:0] v;
      v = W'($urandom);
      wr_data[k]  = v;
      model[r][k] = v;
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic check_col(int c);
    rd_col = c[2:0];
    #1;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (rd_data[k] !== model[k][c]) begin
        failures++;
        $display("col %0d word %0d: got %0d expected %0d", c, k, rd_data[k], model[k][c]);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < N; k++) wr_data[k] = '0;
    @(negedge clk);
    for (int blk = 0; blk < 20; blk++) begin
      for (int r = 0; r < N; r++) write_row(r);
      // idle clocks with garbage data must not write
      for (int k = 0; k < N; k++) wr_data[k] = W'($urandom);
      @(negedge clk);
      for (int c = 0; c < N; c++) check_col(c);
      write_row(blk % N);
      check_col((blk + 3) % N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
