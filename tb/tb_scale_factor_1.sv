// tb_scale_factor_1: self-checking test of scale_factor_1, the shift-add multiplier by
// 1/(2*sqrt(2)) = 2^-2+2^-4+2^-5+2^-7+2^-9.
//
// Random signed values (and the extremes) are applied one per clock. Every
// result must appear exactly one clock after its input and lie within
// 5 LSB (one per truncated term) of x times the shift-add constant
// (0.353515625), computed here in floating point. The constant itself is also
// checked against the exact factor (0.35355339059327373).
module tb_scale_factor_1;
  localparam int unsigned W = 23;
  localparam real CQ = 0.353515625;
  localparam real CT = 0.35355339059327373;
  localparam int  NT = 5;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                in_valid = 1'b0;
  logic signed [W-1:0] x = '0;
  logic                out_valid;
  logic signed [W-1:0] x_out;

  int checks = 0, failures = 0;
  logic signed [W-1:0] exp_x;
  logic                exp_v = 1'b0;

  scale_factor_1 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare on every clock with the value sent one clock earlier
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== exp_v) begin
        failures++;
        $display("valid mismatch: got %0d expected %0d", out_valid, exp_v);
      end else if (exp_v) begin
        real err;
        err = real'(x_out) - real'(exp_x) * CQ;
        if (err > NT || err < -NT) begin
          failures++;
          $display("x=%0d out=%0d expected ~%f", exp_x, x_out, real'(exp_x) * CQ);
        end
      end
    end
  end

  task automatic drive(input logic v, input logic signed [W-1:0] val);
    @(posedge clk);
    exp_v    <= in_valid;
    exp_x    <= x;
    in_valid <= v;
    x        <= val;
  endtask

  initial begin
    checks++;
    if ((CQ - CT) > 3.0e-4 || (CQ - CT) < -3.0e-4) failures++;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    drive(1'b1, {1'b0, {(W-1){1'b1}}} >>> 2);
    drive(1'b1, {1'b1, {(W-1){1'b0}}} >>> 2);
    drive(1'b1, -1);
    drive(1'b1, 1024);
    drive(1'b0, 77);
    for (int n = 0; n < 2000; n++) begin
      logic signed [W-1:0] r;
      r = W'($urandom) >>> 2;
      drive(($urandom % 4) != 0, r);
    end
    drive(1'b0, 0);
    drive(1'b0, 0);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
