// tb_cordic_recursive: self-checking test of the recursive CORDIC.
//
// For each of the three angles and several iteration counts, random vectors
// are rotated. The reference is computed in floating point from the
// rotation-direction table (typed in here independently of the RTL): the
// vector rotated by sum(sigma_i * atan(2^-i)) and multiplied by the gain
// prod(sqrt(1 + 2^-2i)) over the iterations used. The result must match to
// within 2 LSB per iteration. With all 11 iterations the rotation is also
// compared with the exact angle (3pi/8, 3pi/16, pi/16) to 0.1 %. done must
// rise exactly 2*iter_num clocks after start (two registers in the loop),
// and a start issued in the done cycle (back-to-back rotations) must be
// taken. The whole sequence is run twice: on the default instance, then on a
// second instance built with LOOP_REGS = 1 (one register in the loop), where
// done must rise iter_num+1 clocks after start.
module tb_cordic_recursive;
  import dct_pkg::*;

  localparam int unsigned W  = 23;
  localparam real         PI = 3.14159265358979323846;

  // Table of rotation directions, +1 / -1, iteration 0 first
  localparam int SIG [3][11] = '{
    '{ 1,  1, -1,  1,  1, -1,  1,  1, -1, -1,  1},   // 3pi/8
    '{ 1, -1,  1,  1, -1, -1, -1,  1, -1,  1,  1},   // 3pi/16
    '{ 1, -1, -1,  1, -1,  1,  1,  1,  1, -1,  1}    // pi/16
  };
  localparam real ANG [3] = '{3.0 * PI / 8.0, 3.0 * PI / 16.0, PI / 16.0};

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                start = 1'b0;
  angle_e              angle = ANG_3PI_8;
  logic [3:0]          iter_num = 4'd11;
  logic signed [W-1:0] x_in = '0, y_in = '0;
  logic                busy, done;
  logic signed [W-1:0] x_out, y_out;
  bit                  sel = 1'b0;     // 0: dut, 1: dut_l1

  logic                start1, busy1, done1, start2, busy2, done2;
  logic signed [W-1:0] x_out1, y_out1, x_out2, y_out2;

  int checks = 0, failures = 0;

  assign start1 = start && !sel;
  assign start2 = start && sel;
  assign busy   = sel ? busy2 : busy1;
  assign done   = sel ? done2 : done1;
  assign x_out  = sel ? x_out2 : x_out1;
  assign y_out  = sel ? y_out2 : y_out1;

  cordic_recursive dut (
    .clk, .rst_n, .start(start1), .angle, .iter_num, .x_in, .y_in,
    .busy(busy1), .done(done1), .x_out(x_out1), .y_out(y_out1));

  cordic_recursive #(.LOOP_REGS(1)) dut_l1 (
    .clk, .rst_n, .start(start2), .angle, .iter_num, .x_in, .y_in,
    .busy(busy2), .done(done2), .x_out(x_out2), .y_out(y_out2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic void check_result(int a, int n, real xi, real yi);
    real th, k, xr, yr, ex, ey, tol;
    th = 0.0;
    k  = 1.0;
    for (int i = 0; i < n; i++) begin
      th += SIG[a][i] * $atan(1.0 / real'(1 << i));
      k  *= $sqrt(1.0 + 1.0 / real'(1 << (2 * i)));
    end
    xr  = k * (xi * $cos(th) - yi * $sin(th));
    yr  = k * (xi * $sin(th) + yi * $cos(th));
    tol = 2.0 * n + 2.0;
    checks++;
    if (fabs(real'(x_out) - xr) > tol || fabs(real'(y_out) - yr) > tol) begin
      failures++;
      $display("angle %0d n=%0d in (%0.0f,%0.0f) out (%0d,%0d) expected (%0.1f,%0.1f)",
               a, n, xi, yi, x_out, y_out, xr, yr);
    end
    if (n == 11) begin
      // against the exact angle
      ex  = k * (xi * $cos(ANG[a]) - yi * $sin(ANG[a]));
      ey  = k * (xi * $sin(ANG[a]) + yi * $cos(ANG[a]));
      tol = 30.0 + 1.0e-3 * k * $sqrt(xi * xi + yi * yi);
      checks++;
      if (fabs(real'(x_out) - ex) > tol || fabs(real'(y_out) - ey) > tol) begin
        failures++;
        $display("angle %0d: (%0d,%0d) too far from exact rotation (%0.1f,%0.1f)",
                 a, x_out, y_out, ex, ey);
      end
    end
  endfunction

  // start one rotation in the current cycle; return with done seen
  task automatic rotate(int a, int n, logic signed [W-1:0] xv, logic signed [W-1:0] yv,
                        bit chain);
    int cyc;
    start    <= 1'b1;
    angle    <= angle_e'(a);
    iter_num <= 4'(n);
    x_in     <= xv;
    y_in     <= yv;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!done && cyc < 40);
    checks++;
    if (cyc != (sel ? n + 1 : 2 * n)) begin
      failures++;
      $display("loop regs %0d: done after %0d cycles, expected %0d", sel ? 1 : 2, cyc,
               sel ? n + 1 : 2 * n);
    end
    check_result(a, n, real'(xv), real'(yv));
    if (!chain) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int rep = 0; rep < 600; rep++) begin
      int a, n;
      logic signed [W-1:0] xv, yv;
      if (rep == 300) begin
        repeat (2) @(negedge clk);
        sel = 1'b1;
      end
      a  = rep % 3;
      n  = (rep % 300 < 150) ? 11 : 1 + ($urandom % 11);
      xv = W'($signed($urandom % (1 << 19)) - (1 << 18));
      yv = W'($signed($urandom % (1 << 19)) - (1 << 18));
      rotate(a, n, xv, yv, (rep % 5) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
