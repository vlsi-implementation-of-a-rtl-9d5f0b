// tb_dct2d_image: image-level workload for the 2-D DCT, at default
// parameters.
//
// Two synthetic 24-bit RGB images are coded the way a baseline JPEG encoder
// uses the transform: each colour layer is cut into 8x8 blocks, pixels are
// level-shifted to [-128, 127], transformed by the hardware, quantized with
// the standard JPEG luminance table, dequantized and inverse-transformed (in
// floating point) to give the reconstructed image. The same chain is run
// with an exact floating-point forward DCT. Sizes: 512x512 (the size of the
// first image set the design was evaluated on) and 768x512 (the size of the
// Kodak set). Pixels come from a fixed mix of smooth gradients, texture and
// pseudo-random noise, since no photographs are available to the bench.
//
// Checks: every block completes and comes out in order, each
// reconstruction's PSNR (over the three layers, peak 255) is printed, and
// the PSNR obtained with the hardware transform must be within 0.05 dB of
// the one obtained with the exact transform. The cycles per block are
// reported.
module tb_dct2d_image;
  import dct_pkg::*;

  localparam int unsigned DW = 12;
  localparam real         PI = 3.14159265358979323846;

  // JPEG luminance quantization table, row-major
  localparam int QT [64] = '{
    16, 11, 10, 16,  24,  40,  51,  61,
    12, 12, 14, 19,  26,  58,  60,  55,
    14, 13, 16, 24,  40,  57,  69,  56,
    14, 17, 22, 29,  51,  87,  80,  62,
    18, 22, 37, 56,  68, 109, 103,  77,
    24, 35, 55, 64,  81, 104, 113,  92,
    49, 64, 78, 87, 103, 121, 120, 101,
    72, 92, 95, 98, 112, 100, 103,  99};

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

  dct2d_top dut (.*);

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int pix [DCT_N][DCT_N];  // level-shifted pixels
  } blk_t;
  blk_t sb [$];

  real sse_hw, sse_ref;
  int  cols_seen;
  int  blocks_out;
  real yhw [DCT_N][DCT_N];

  function automatic real cmat(int m, int n);
    return 0.5 * ((m == 0) ? 1.0 / $sqrt(2.0) : 1.0)
           * $cos(real'(m * (2 * n + 1)) * PI / 16.0);
  endfunction

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // quantize, dequantize, inverse transform, clamp; return squared error
  function automatic real recon_sse(input real y [DCT_N][DCT_N], input int pix [DCT_N][DCT_N]);
    real dq [DCT_N][DCT_N];
    real t [DCT_N][DCT_N];
    real sse;
    for (int k = 0; k < DCT_N; k++)
      for (int l = 0; l < DCT_N; l++)
        dq[k][l] = real'(rnd(y[k][l] / real'(QT[k * 8 + l])) * QT[k * 8 + l]);
    // x = C^T Y C
    for (int r = 0; r < DCT_N; r++)
      for (int l = 0; l < DCT_N; l++) begin
        t[r][l] = 0.0;
        for (int k = 0; k < DCT_N; k++) t[r][l] += cmat(k, r) * dq[k][l];
      end
    sse = 0.0;
    for (int r = 0; r < DCT_N; r++)
      for (int c = 0; c < DCT_N; c++) begin
        real v;
        int  p;
        v = 0.0;
        for (int l = 0; l < DCT_N; l++) v += t[r][l] * cmat(l, c);
        p = rnd(v) + 128;
        if (p < 0) p = 0;
        if (p > 255) p = 255;
        sse += real'((p - (pix[r][c] + 128)) * (p - (pix[r][c] + 128)));
      end
    return sse;
  endfunction

  function automatic void fdct2(input int x [DCT_N][DCT_N], output real y [DCT_N][DCT_N]);
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

  // synthetic picture, 8-bit
  function automatic int pixel(int x, int y, int u);
    real v;
    v = 128.0 + 70.0 * $sin(0.021 * x + 1.3 * u) * $cos(0.017 * y)
        + 25.0 * $sin(0.29 * (x + 2 * y + 7 * u)) * $cos(0.11 * x)
        + 12.0 * $sin(1.7 * x * (u + 1)) * $sin(1.3 * y);
    v += real'(int'($urandom % 17) - 8);
    if (v < 0.0) v = 0.0;
    if (v > 255.0) v = 255.0;
    return int'(v);
  endfunction

  // output side: collect columns, reconstruct, accumulate errors
  always @(negedge clk) begin
    #2;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (sb.size() == 0 || out_col != 3'(cols_seen)) begin
        failures++;
        $display("unexpected column %0d", out_col);
      end else begin
        for (int k = 0; k < DCT_N; k++) yhw[k][out_col] = real'(out_coef[k]);
        cols_seen++;
        if (cols_seen == DCT_N) begin
          blk_t b;
          real  yref [DCT_N][DCT_N];
          b = sb.pop_front();
          fdct2(b.pix, yref);
          sse_hw  += recon_sse(yhw, b.pix);
          sse_ref += recon_sse(yref, b.pix);
          cols_seen = 0;
          blocks_out++;
        end
      end
    end
  end

  task automatic run_image(input int h, input int v, input string name);
    int     nblk;
    longint t0;
    real    mse_hw, mse_ref, psnr_hw, psnr_ref;
    sse_hw     = 0.0;
    sse_ref    = 0.0;
    cols_seen  = 0;
    blocks_out = 0;
    nblk       = 3 * (h / 8) * (v / 8);
    t0         = cycle;
    for (int u = 0; u < 3; u++)
      for (int by = 0; by < v / 8; by++)
        for (int bx = 0; bx < h / 8; bx++) begin
          blk_t b;
          for (int r = 0; r < DCT_N; r++)
            for (int c = 0; c < DCT_N; c++) b.pix[r][c] = pixel(bx * 8 + c, by * 8 + r, u) - 128;
          sb.push_back(b);
          for (int r = 0; r < DCT_N; r++) begin
            in_valid = 1'b1;
            for (int c = 0; c < DCT_N; c++) in_row[c] = DW'(b.pix[r][c]);
            #1;
            while (!in_ready) begin
              @(negedge clk);
              #1;
            end
            @(negedge clk);
            in_valid = 1'b0;
          end
        end
    while (blocks_out < nblk) @(negedge clk);
    mse_hw   = sse_hw / real'(3 * h * v);
    mse_ref  = sse_ref / real'(3 * h * v);
    psnr_hw  = 20.0 * $log10(255.0 / $sqrt(mse_hw));
    psnr_ref = 20.0 * $log10(255.0 / $sqrt(mse_ref));
    $display("%s %0dx%0d: %0d blocks, %0.1f cycles/block, PSNR exact DCT %0.3f dB, hardware %0.3f dB",
             name, h, v, nblk, real'(cycle - t0) / real'(nblk), psnr_ref, psnr_hw);
    checks++;
    if (psnr_ref - psnr_hw > 0.05 || psnr_hw - psnr_ref > 0.05) begin
      failures++;
      $display("%s: PSNR differs by more than 0.05 dB", name);
    end
  endtask

  initial begin
    for (int n = 0; n < DCT_N; n++) in_row[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_image(512, 512, "image-512");
    run_image(768, 512, "image-768");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
