// cordic_recursive: iterative (recursive) rotation-mode CORDIC, shared by
// the three constant rotations of the 8-point Loeffler DCT.
//
// The micro-rotations are done one after another on a single pair of
// adder/subtractors with two barrel shifters (>>> i), feeding each result
// back through the input multiplexers:
//     x(i+1) = x(i) - sigma_i * 2^-i * y(i)
//     y(i+1) = y(i) + sigma_i * 2^-i * x(i)
// The rotation directions sigma_i are not computed from an angle
// accumulator: for the three fixed angles they come from the lookup table in
// dct_pkg. The result is the rotated vector multiplied by the CORDIC gain
// (about 1.64676 after 11 iterations); the gain is removed downstream by
// cordic_scale.
//
// The number of iterations is set per rotation by iter_num (1..11, 11 being
// the design's setting; 0 is treated as 1 and values above 11 as 11).
//
// Timing: start (with angle, iter_num, x_in, y_in) is accepted when busy is
// low or in the cycle done is high. The operands are loaded at that edge,
// the iterations follow, and done is high for one cycle with x_out/y_out holding the result (see LOOP_REGS for when).
// x_out/y_out keep their value until the next start.
//
// LOOP_REGS selects the loop structure. With 2 (the default) the loop is
// built as the published block diagram draws it: the input multiplexers (new
// operands or fed-back result) load a register pair, the adders write a
// second register pair, and that pair feeds back to the multiplexers, so one
// micro-rotation takes two clocks and done comes 2*iter_num cycles after
// start. With 1 (an option of this implementation) the loop holds a single
// register pair and each micro-rotation takes one clock; done then comes
// iter_num+1 cycles after start. The start/busy/done protocol is the same
// for both.
module cordic_recursive
  import dct_pkg::*;
#(
  parameter int unsigned W         = 23,
  parameter int unsigned LOOP_REGS = 2      // 1 or 2 registers in the loop
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  angle_e              angle,
  input  logic [3:0]          iter_num,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out
);

  logic signed [W-1:0] x_q, y_q;     // adder output registers (the result)
  logic [3:0]          iter_q;       // index of the next micro-rotation
  logic [3:0]          last_q;       // index of the final micro-rotation
  angle_e              angle_q;

  logic                neg;
  logic signed [W-1:0] x_op, y_op;   // operands seen by the adders
  logic signed [W-1:0] x_sh, y_sh;
  logic signed [W-1:0] x_nx, y_nx;   // one micro-rotation of (x_op, y_op)
  logic [3:0]          n_clamped;

  always_comb begin
    if (iter_num == 4'd0)                   n_clamped = 4'd1;
    else if (iter_num > 4'(MAX_ITER))       n_clamped = 4'(MAX_ITER);
    else                                    n_clamped = iter_num;
  end

  assign neg  = sigma_is_neg(angle_q, iter_q);
  assign x_sh = x_op >>> iter_q;
  assign y_sh = y_op >>> iter_q;
  assign x_nx = neg ? x_op + y_sh : x_op - y_sh;
  assign y_nx = neg ? y_op - x_sh : y_op + x_sh;

  wire take = start && (!busy || done);

  if (LOOP_REGS == 2) begin : g_two_regs
    // input register pair behind the multiplexers; ph_q high: the adders
    // work in this clock, low: the result is fed back to the input pair
    logic signed [W-1:0] x_i, y_i;
    logic                ph_q;

    assign x_op = x_i;
    assign y_op = y_i;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy    <= 1'b0;
        done    <= 1'b0;
        ph_q    <= 1'b0;
        iter_q  <= '0;
        last_q  <= '0;
        angle_q <= ANG_3PI_8;
        x_i     <= '0;
        y_i     <= '0;
        x_q     <= '0;
        y_q     <= '0;
      end else begin
        done <= 1'b0;
        if (take) begin
          x_i     <= x_in;
          y_i     <= y_in;
          angle_q <= angle;
          iter_q  <= '0;
          last_q  <= n_clamped - 4'd1;
          ph_q    <= 1'b1;
          busy    <= 1'b1;
        end else if (busy && !done) begin
          if (ph_q) begin
            x_q    <= x_nx;
            y_q    <= y_nx;
            iter_q <= iter_q + 4'd1;
            if (iter_q == last_q) done <= 1'b1;
          end else begin
            x_i <= x_q;
            y_i <= y_q;
          end
          ph_q <= !ph_q;
        end else if (done) begin
          busy <= 1'b0;
        end
      end
    end
  end else begin : g_one_reg
    assign x_op = x_q;
    assign y_op = y_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy    <= 1'b0;
        done    <= 1'b0;
        iter_q  <= '0;
        last_q  <= '0;
        angle_q <= ANG_3PI_8;
        x_q     <= '0;
        y_q     <= '0;
      end else begin
        done <= 1'b0;
        if (take) begin
          x_q     <= x_in;
          y_q     <= y_in;
          angle_q <= angle;
          iter_q  <= '0;
          last_q  <= n_clamped - 4'd1;
          busy    <= 1'b1;
        end else if (busy && !done) begin
          x_q    <= x_nx;
          y_q    <= y_nx;
          iter_q <= iter_q + 4'd1;
          if (iter_q == last_q) done <= 1'b1;
        end else if (done) begin
          busy <= 1'b0;
        end
      end
    end
  end

  assign x_out = x_q;
  assign y_out = y_q;

endmodule
