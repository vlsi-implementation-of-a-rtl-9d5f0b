// tb_dct2d_loop1: end-to-end test of the 8x8 2-D DCT built with the
// one-register CORDIC loop (CORDIC_LOOP_REGS = 1), all other parameters at
// their defaults.
//
// Same method as the default end-to-end test: random 8x8 blocks of
// level-shifted pixels, plus a gradient, are streamed in as rows and each
// coefficient is compared with the floating-point orthonormal 2-D DCT
// (within 3 + 1 % of the block's largest |Y|), columns in order 0..7. Blocks
// follow each other with and without output back-pressure, and two run with
// iter_num = 8. With one clock per micro-rotation each 1-D vector costs
// 3N+8 cycles of the shared unit and has a latency of 3N+16, so an isolated
// block takes 2*((3N+16) + 7*(3N+8)) + 1 cycles, 673 for N = 11; this is
// checked on the first block.
module tb_dct2d_loop1;
  import dct_pkg::*;

  localparam int unsigned DW  = 12;
  localparam real         PI  = 3.14159265358979323846;
  localparam int          NBLK = 8;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic [3:0]           iter_num = 4'd11;
  logic                 in_valid = 1'b0;
  logic                 in_ready;
  logic signed [DW-1:0] in_row [DCT_N];
  logic                 out_valid;
  logic                 out_ready = 1'b1;
  logic signed [DW-1:0] out_coef [DCT_N];
  logic [2:0]           out_col;

  dct2d_top #(.CORDIC_LOOP_REGS(1)) dut (.*);

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_row_writes = 0, n_col_issues = 0, n_in_stall = 0, n_out_stall = 0;
  int n_overlap = 0, n_reduced_iter_blocks = 0;

  typedef struct {
    real    y [DCT_N][DCT_N];
    real    rel_tol;
    longint t_first_row;
  } blk_t;
  blk_t   sb [$];
  int     cols_seen = 0;
  int     blocks_done = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real cmat(int m, int n);
    return 0.5 * ((m == 0) ? 1.0 / $sqrt(2.0) : 1.0)
           * $cos(real'(m * (2 * n + 1)) * PI / 16.0);
  endfunction

  // Y = C X C^T
  function automatic void ref_dct2(input int x [DCT_N][DCT_N], output real y [DCT_N][DCT_N]);
    real t [DCT_N][DCT_N];
    for (int r = 0; r < DCT_N; r++)
      for (int k = 0; k < DCT_N; k++) begin
        t[r][k] = 0.0;
        for (int n = 0; n < DCT_N; n++) t[r][k] += real'(x[r][n]) * cmat(k, n);
      end
    for (int k = 0; k < DCT_N; k++)
      for (int c = 0; c < DCT_N; c++) begin
        y[k][c] = 0.0;
        for (int r = 0; r < DCT_N; r++) y[k][c] += cmat(k, r) * t[r][c];
      end
  endfunction

  // ---------------- monitors ----------------
  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      if (dut.mem_we) n_row_writes++;
      if (dut.phase_q == 1'b1 && dut.d_in_ready) n_col_issues++;  // column pass
      if (in_valid && !in_ready) n_in_stall++;
      if (out_valid && !out_ready) n_out_stall++;
      if (in_valid && in_ready && sb.size() > 0 && cols_seen > 0) n_overlap++;
      if (out_valid && out_ready) begin
        if (sb.size() == 0) begin
          checks++;
          failures++;
          $display("output with no block pending");
        end else begin
          real mx, tol;
          mx = 0.0;
          for (int k = 0; k < DCT_N; k++)
            for (int c = 0; c < DCT_N; c++)
              if (fabs(sb[0].y[k][c]) > mx) mx = fabs(sb[0].y[k][c]);
          tol = 3.0 + sb[0].rel_tol * mx;
          checks++;
          if (out_col != 3'(cols_seen)) begin
            failures++;
            $display("column %0d out of order, expected %0d", out_col, cols_seen);
          end
          for (int k = 0; k < DCT_N; k++) begin
            checks++;
            if (fabs(real'(out_coef[k]) - sb[0].y[k][out_col]) > tol) begin
              failures++;
              $display("block %0d Y[%0d][%0d] = %0d expected %0.2f", blocks_done, k,
                       out_col, out_coef[k], sb[0].y[k][out_col]);
            end
          end
          cols_seen++;
          if (cols_seen == DCT_N) begin
            if (blocks_done == 0) begin
              checks++;
              if (cycle - sb[0].t_first_row != longint'(2 * ((3 * 11 + 16) + 7 * (3 * 11 + 8)) + 1)) begin
                failures++;
                $display("first block took %0d cycles", cycle - sb[0].t_first_row);
              end
            end
            void'(sb.pop_front());
            cols_seen = 0;
            blocks_done++;
          end
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  int xb [DCT_N][DCT_N];

  task automatic send_block(input real rel_tol);
    blk_t b;
    ref_dct2(xb, b.y);
    b.rel_tol     = rel_tol;
    b.t_first_row = -1;
    for (int r = 0; r < DCT_N; r++) begin
      in_valid = 1'b1;
      for (int n = 0; n < DCT_N; n++) in_row[n] = DW'(xb[r][n]);
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      if (r == 0) begin
        b.t_first_row = cycle;
        sb.push_back(b);
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  task automatic wait_blocks(int n);
    int guard;
    guard = 0;
    while (blocks_done < n && guard < 100000) begin
      @(negedge clk);
      guard++;
    end
  endtask

  initial begin
    for (int n = 0; n < DCT_N; n++) in_row[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // block 0: gradient, alone, timed
    for (int r = 0; r < DCT_N; r++)
      for (int n = 0; n < DCT_N; n++) xb[r][n] = 12 * r - 9 * n + 20;
    send_block(0.01);
    wait_blocks(1);

    // checkerboard
    for (int r = 0; r < DCT_N; r++)
      for (int n = 0; n < DCT_N; n++) xb[r][n] = ((r + n) % 2 == 1) ? 127 : -128;
    send_block(0.01);

    // random blocks, back to back, with output back-pressure
    fork
      begin
        for (int b = 0; b < NBLK; b++) begin
          for (int r = 0; r < DCT_N; r++)
            for (int n = 0; n < DCT_N; n++) xb[r][n] = int'($urandom % 256) - 128;
          send_block(0.01);
        end
      end
      begin
        repeat (2000) @(negedge clk);
        for (int c = 0; c < 3000; c++) begin
          @(negedge clk);
          out_ready = ($urandom % 3) != 0;
        end
        out_ready = 1'b1;
      end
    join
    wait_blocks(NBLK + 2);

    // reduced iteration count (mode change between blocks)
    iter_num = 4'd8;
    for (int b = 0; b < 2; b++) begin
      for (int r = 0; r < DCT_N; r++)
        for (int n = 0; n < DCT_N; n++) xb[r][n] = int'($urandom % 256) - 128;
      send_block(0.04);
      n_reduced_iter_blocks++;
    end
    wait_blocks(NBLK + 4);
    iter_num = 4'd11;

    checks++;
    if (blocks_done != NBLK + 4) begin
      failures++;
      $display("only %0d blocks completed", blocks_done);
    end

    $display("mechanisms: row writes %0d, column issues %0d, input stalls %0d, output stalls %0d, overlap %0d, reduced-iteration blocks %0d",
             n_row_writes, n_col_issues, n_in_stall, n_out_stall, n_overlap,
             n_reduced_iter_blocks);
    checks += 6;
    if (n_row_writes == 0)          failures++;
    if (n_col_issues == 0)          failures++;
    if (n_in_stall == 0)            failures++;
    if (n_out_stall == 0)           failures++;
    if (n_overlap == 0)             failures++;
    if (n_reduced_iter_blocks == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
