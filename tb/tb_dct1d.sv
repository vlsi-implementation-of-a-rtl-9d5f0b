// tb_dct1d: self-checking test of the 8-point CORDIC Loeffler 1-D DCT.
//
// The reference is the orthonormal DCT-II evaluated in floating point,
// X_k = 1/2 c(k) sum_n x_n cos((2n+1) k pi / 16), c(0) = 1/sqrt(2).
// With 11 CORDIC iterations each output must be within 2 + 0.6 % of the
// largest |X| of its vector (the shift-add CORDIC gain correction alone is
// 0.35 % off). Phases:
//   1. a stream of vectors with in_valid held high and out_ready high:
//      values, tag order, latency (6N+13 cycles) and the rotation-unit
//      period (6N+5 cycles between results) are checked;
//   2. random gaps on the input and random out_ready back-pressure;
//   3. iter_num = 6, with a looser bound (the angle is then only
//      approximated to about 2 degrees) and the shorter latency;
//   4. a full-scale vector, whose DC term must saturate at +2047.
// A second instance with EVEN_SF2 = 1 sees the same stimulus; its X2 and X6
// go through the 1/3.1694 unit instead of the CORDIC gain correction and
// must be within 5 % of the reference, all other outputs as tight as above.
module tb_dct1d;
  import dct_pkg::*;

  localparam int unsigned DW    = 12;
  localparam int unsigned TAG_W = 4;
  localparam real         PI    = 3.14159265358979323846;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic [3:0]           iter_num = 4'd11;
  logic                 in_valid = 1'b0;
  logic                 in_ready, in_ready_b;
  logic signed [DW-1:0] in_x [DCT_N];
  logic [TAG_W-1:0]     in_tag = '0;
  logic                 out_valid, out_valid_b;
  logic                 out_ready = 1'b1;
  logic signed [DW-1:0] out_x [DCT_N];
  logic signed [DW-1:0] out_x_b [DCT_N];
  logic [TAG_W-1:0]     out_tag, out_tag_b;

  dct1d dut (
    .clk, .rst_n, .iter_num, .in_valid, .in_ready, .in_x, .in_tag,
    .out_valid, .out_ready, .out_x, .out_tag);

  dct1d #(.EVEN_SF2(1'b1)) dut_sf2 (
    .clk, .rst_n, .iter_num, .in_valid, .in_ready(in_ready_b), .in_x, .in_tag,
    .out_valid(out_valid_b), .out_ready, .out_x(out_x_b), .out_tag(out_tag_b));

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    real        ref_x [DCT_N];
    logic [3:0] tag;
    longint     t_in;
    real        rel_tol;
  } exp_t;
  exp_t   sb [$];
  longint last_out = -1;
  int     n_out = 0;
  int     check_period = 0;
  int     exp_latency = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic void ref_dct(input logic signed [DW-1:0] x [DCT_N],
                                  output real y [DCT_N]);
    for (int k = 0; k < DCT_N; k++) begin
      real acc;
      acc = 0.0;
      for (int n = 0; n < DCT_N; n++)
        acc += real'(x[n]) * $cos(real'((2 * n + 1) * k) * PI / 16.0);
      y[k] = 0.5 * acc * ((k == 0) ? 1.0 / $sqrt(2.0) : 1.0);
    end
  endfunction

  // ---------------- output monitor ----------------
  always @(negedge clk) begin
    #2;
    if (rst_n && out_valid && out_ready) begin
      exp_t e;
      real  mx, tol;
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = sb.pop_front();
        mx = 0.0;
        for (int k = 0; k < DCT_N; k++) if (fabs(e.ref_x[k]) > mx) mx = fabs(e.ref_x[k]);
        tol = 2.0 + e.rel_tol * mx;
        if (out_tag !== e.tag || out_tag_b !== e.tag || !out_valid_b) begin
          failures++;
          $display("tag %0d/%0d expected %0d", out_tag, out_tag_b, e.tag);
        end
        for (int k = 0; k < DCT_N; k++) begin
          real tb_tol;
          checks += 2;
          if (fabs(real'(out_x[k]) - e.ref_x[k]) > tol) begin
            failures++;
            $display("X%0d = %0d, expected %0.2f (tol %0.2f)", k, out_x[k], e.ref_x[k], tol);
          end
          tb_tol = (k == 2 || k == 6) ? tol + 0.05 * fabs(e.ref_x[k]) : tol;
          if (fabs(real'(out_x_b[k]) - e.ref_x[k]) > tb_tol) begin
            failures++;
            $display("EVEN_SF2: X%0d = %0d, expected %0.2f", k, out_x_b[k], e.ref_x[k]);
          end
        end
        if (exp_latency != 0 && n_out == 0) begin
          checks++;
          if (cycle - e.t_in != longint'(exp_latency)) begin
            failures++;
            $display("latency %0d, expected %0d", cycle - e.t_in, exp_latency);
          end
        end
        if (check_period != 0 && n_out > 0) begin
          checks++;
          if (cycle - last_out != longint'(check_period)) begin
            failures++;
            $display("period %0d, expected %0d", cycle - last_out, check_period);
          end
        end
      end
      last_out = cycle;
      n_out++;
    end
  end

  // ---------------- stimulus ----------------
  logic [3:0] next_tag = '0;

  task automatic send(input logic signed [DW-1:0] x [DCT_N], input real rel_tol,
                      input bit gap);
    exp_t e;
    in_valid = !gap;
    in_x     = x;
    in_tag   = next_tag;
    #1;
    while (!(in_valid && in_ready)) begin
      @(negedge clk);
      in_valid = 1'b1;
      #1;
    end
    ref_dct(x, e.ref_x);
    e.tag     = next_tag;
    e.t_in    = cycle;
    e.rel_tol = rel_tol;
    sb.push_back(e);
    next_tag++;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic random_vec(output logic signed [DW-1:0] x [DCT_N], input int amp);
    for (int n = 0; n < DCT_N; n++) x[n] = DW'($signed($urandom % (2 * amp)) - amp);
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while (sb.size() != 0 && guard < 5000) begin
      @(negedge clk);
      guard++;
    end
  endtask

  logic signed [DW-1:0] v [DCT_N];

  initial begin
    for (int n = 0; n < DCT_N; n++) in_x[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. streaming, nominal 11 iterations
    exp_latency  = 6 * 11 + 13;
    check_period = 6 * 11 + 5;
    n_out        = 0;
    for (int n = 0; n < DCT_N; n++) v[n] = DW'(n * 37 - 100);
    send(v, 0.006, 1'b0);
    for (int i = 0; i < 30; i++) begin
      random_vec(v, (i % 3 == 0) ? 512 : 128);
      send(v, 0.006, 1'b0);
    end
    drain();

    // 2. gaps and back-pressure
    exp_latency  = 0;
    check_period = 0;
    fork
      begin
        for (int i = 0; i < 40; i++) begin
          random_vec(v, 400);
          send(v, 0.006, ($urandom % 3) == 0);
        end
        drain();
      end
      begin
        for (int c = 0; c < 3000 && (sb.size() != 0 || c < 100); c++) begin
          @(negedge clk);
          out_ready = ($urandom % 4) != 0;
        end
        out_ready = 1'b1;
      end
    join
    out_ready = 1'b1;
    drain();

    // 3. reduced iteration count
    iter_num     = 4'd6;
    exp_latency  = 6 * 6 + 13;
    check_period = 6 * 6 + 5;
    n_out        = 0;
    for (int i = 0; i < 10; i++) begin
      random_vec(v, 300);
      send(v, 0.05, 1'b0);
    end
    drain();
    iter_num     = 4'd11;
    exp_latency  = 0;
    check_period = 0;

    // 4. saturation of the DC term
    for (int n = 0; n < DCT_N; n++) v[n] = 12'sd2047;
    send(v, 1.0, 1'b0);
    repeat (120) @(negedge clk);
    checks++;
    if (out_x[0] !== 12'sd2047) begin
      failures++;
      $display("DC of full-scale vector = %0d, expected saturation at 2047", out_x[0]);
    end
    sb.delete();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
