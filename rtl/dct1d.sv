// dct1d: 8-point 1-D DCT (orthonormal, X_k = sqrt(2/8) c(k) sum x_n
// cos((2n+1)k pi/16)) computed with the Loeffler factorisation, in which the
// three plane rotations are done by one shared recursive CORDIC and all
// constant factors by shift-and-add scale units.
//
// Dataflow, in the order of the nine-stage machine it follows:
//   stages 1-3  butterflies: a_k = x_k + x_(7-k), d_k = x_k - x_(7-k);
//               a0+a3, a1+a2, e0 = a0-a3, e1 = a1-a2; s0 = sum, s4 = diff.
//   stage 4     one cordic_recursive instance performs, one after another,
//               the rotations by 3pi/8 of (e0, e1), by 3pi/16 of (d0, d3)
//               and by pi/16 of (d1, d2).
//   stage 5/6   one cordic_scale instance removes the CORDIC gain from the
//               six rotated values, one per clock; they are collected in
//               six holding registers.
//   stage 7     odd butterflies: with b7,b4 from the 3pi/16 rotation and
//               b6,b5 from the pi/16 rotation, X1' = (b7+b5)+(b4+b6),
//               X7' = (b7+b5)-(b4+b6), X3' = b7-b5, X5' = b4-b6.
//   stage 8/9   one scale_factor_1 instance (x 1/(2 sqrt2)) is shared by
//               X0, X4, X1, X7; X3 and X5 are halved by a shift; X2 and X6
//               (the 3pi/8 rotation, already gain-corrected) are halved by a
//               shift, or, with EVEN_SF2 = 1, bypass the gain correction and
//               go through scale_factor_2 (x 1/3.1694) instead.
// The flow graph, the sharing of the CORDIC and of the scale units, the
// sigma table and the shift-add constants follow the design description.
// The internal word length (FRAC fraction bits), the valid/ready handshakes,
// the one-register CORDIC loop option, the X2/X6 scaling default and the
// output rounding are this implementation's own choices.
//
// Interface: a vector x[0..7] with a sideband tag is taken when in_valid and
// in_ready are both high; the result X[0..7] (same tag) is presented with
// out_valid and held until out_ready. Samples are DATA_W-bit two's
// complement; internally they carry FRAC fraction bits, and outputs are
// rounded to nearest and saturated to DATA_W bits. iter_num sets the number
// of CORDIC iterations (11 by default in the surrounding design).
//
// Timing with N = iter_num: the stages 1-3 pipeline holds up to three
// vectors. With the default two-register CORDIC loop (CORDIC_LOOP_REGS = 2)
// the rotation unit takes a new vector every 6N+5 cycles, and a result
// appears 6N+13 cycles after its vector was accepted when nothing stalls
// (71 and 79 cycles for N = 11). With CORDIC_LOOP_REGS = 1 every rotation is
// N-1 cycles shorter: period 3N+8, latency 3N+16 (41 and 49). Two
// assertions guard the sharing and the handshake: the CORDIC is never
// restarted while busy, and a result that is not taken stays on the outputs.
module dct1d
  import dct_pkg::*;
#(
  parameter int unsigned DATA_W   = dct_pkg::SAMPLE_W,
  parameter int unsigned FRAC     = 6,
  parameter int unsigned TAG_W    = 4,
  parameter bit          EVEN_SF2 = 1'b0,
  parameter int unsigned CORDIC_LOOP_REGS = 2  // 1 or 2, see cordic_recursive
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [3:0]               iter_num,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_x [DCT_N],
  input  logic [TAG_W-1:0]         in_tag,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [DATA_W-1:0] out_x [DCT_N],
  output logic [TAG_W-1:0]         out_tag
);

  localparam int unsigned W = DATA_W + 6 + FRAC;  // internal word
  typedef logic signed [W-1:0] word_t;

  // ------------------------------------------------------------------
  // Stages 1-3: butterflies, valid/ready pipeline
  // ------------------------------------------------------------------
  word_t            xin_w [DCT_N];
  word_t            a1_q [4], d1_q [4];
  word_t            sum03_q, sum12_q, e0_2_q, e1_2_q, d2_q [4];
  word_t            s0_3_q, s4_3_q, e0_3_q, e1_3_q, d3_q [4];
  logic             v1_q, v2_q, v3_q;
  logic [TAG_W-1:0] tag1_q, tag2_q, tag3_q;
  logic             rdy1, rdy2, rdy3, take3;

  always_comb begin
    for (int k = 0; k < DCT_N; k++) xin_w[k] = word_t'(in_x[k]) <<< FRAC;
  end

  assign rdy3     = !v3_q || take3;
  assign rdy2     = !v2_q || rdy3;
  assign rdy1     = !v1_q || rdy2;
  assign in_ready = rdy1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      v2_q <= 1'b0;
      v3_q <= 1'b0;
    end else begin
      if (rdy1) v1_q <= in_valid;
      if (rdy2) v2_q <= v1_q;
      if (rdy3) v3_q <= v2_q;
    end
  end

  always_ff @(posedge clk) begin
    if (rdy1) begin
      for (int k = 0; k < 4; k++) begin
        a1_q[k] <= xin_w[k] + xin_w[7-k];
        d1_q[k] <= xin_w[k] - xin_w[7-k];
      end
      tag1_q <= in_tag;
    end
    if (rdy2) begin
      sum03_q <= a1_q[0] + a1_q[3];
      sum12_q <= a1_q[1] + a1_q[2];
      e0_2_q  <= a1_q[0] - a1_q[3];
      e1_2_q  <= a1_q[1] - a1_q[2];
      d2_q    <= d1_q;
      tag2_q  <= tag1_q;
    end
    if (rdy3) begin
      s0_3_q <= sum03_q + sum12_q;
      s4_3_q <= sum03_q - sum12_q;
      e0_3_q <= e0_2_q;
      e1_3_q <= e1_2_q;
      d3_q   <= d2_q;
      tag3_q <= tag2_q;
    end
  end

  // ------------------------------------------------------------------
  // Stages 4-6: shared CORDIC and shared CORDIC scale factor
  // ------------------------------------------------------------------
  logic             rot_busy_q;
  logic [1:0]       rot_k_q;          // rotation in progress: 0, 1, 2
  word_t            op_d_q [4];       // odd-part operands kept for k = 1, 2
  word_t            rot_s0_q, rot_s4_q;
  logic [TAG_W-1:0] rot_tag_q;

  logic             c_start, c_busy, c_done;
  angle_e           c_angle;
  word_t            c_xin, c_yin, c_xout, c_yout;

  word_t            hx_q, hy_q;       // CORDIC result held for the scaler
  logic [1:0]       hk_q;             // which rotation it belongs to
  logic [1:0]       feed_q;           // 0 idle, 1 feeding x, 2 feeding y

  logic             csf_in_valid, csf_out_valid;
  word_t            csf_in, csf_out;
  logic [2:0]       feed_slot, csf_slot_q;
  logic             bypass_now;

  // stage 6 holding registers
  word_t            sc_q [6];         // x',y' of 3pi/8, 3pi/16, pi/16
  word_t            st6_s0_q, st6_s4_q;
  logic [TAG_W-1:0] st6_tag_q;
  logic             v6_q;
  logic             take6;

  assign take3 = v3_q && !rot_busy_q && !v6_q;

  always_comb begin
    c_start = 1'b0;
    c_angle = ANG_3PI_8;
    c_xin   = e0_3_q;
    c_yin   = e1_3_q;
    if (take3) begin
      c_start = 1'b1;
    end else if (rot_busy_q && c_done && rot_k_q != 2'd2) begin
      c_start = 1'b1;
      if (rot_k_q == 2'd0) begin
        c_angle = ANG_3PI_16;
        c_xin   = op_d_q[0];
        c_yin   = op_d_q[3];
      end else begin
        c_angle = ANG_PI_16;
        c_xin   = op_d_q[1];
        c_yin   = op_d_q[2];
      end
    end
  end

  cordic_recursive #(.W(W), .LOOP_REGS(CORDIC_LOOP_REGS)) u_cordic (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (c_start),
    .angle    (c_angle),
    .iter_num (iter_num),
    .x_in     (c_xin),
    .y_in     (c_yin),
    .busy     (c_busy),
    .done     (c_done),
    .x_out    (c_xout),
    .y_out    (c_yout)
  );

  assign feed_slot    = {hk_q, 1'b0} + ((feed_q == 2'd2) ? 3'd1 : 3'd0);
  assign bypass_now   = EVEN_SF2 && (hk_q == 2'd0);
  assign csf_in       = (feed_q == 2'd1) ? hx_q : hy_q;
  assign csf_in_valid = (feed_q != 2'd0) && !bypass_now;

  cordic_scale #(.W(W)) u_cordic_scale (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (csf_in_valid),
    .x         (csf_in),
    .out_valid (csf_out_valid),
    .x_out     (csf_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rot_busy_q <= 1'b0;
      rot_k_q    <= '0;
      feed_q     <= '0;
      hk_q       <= '0;
      v6_q       <= 1'b0;
    end else begin
      if (take3) begin
        rot_busy_q <= 1'b1;
        rot_k_q    <= '0;
      end else if (rot_busy_q && c_done && rot_k_q != 2'd2) begin
        rot_k_q <= rot_k_q + 2'd1;
      end

      // feed the held pair to the scaler: x, then y
      if (feed_q == 2'd1)      feed_q <= 2'd2;
      else if (feed_q == 2'd2) feed_q <= 2'd0;
      if (rot_busy_q && c_done) begin
        hk_q   <= rot_k_q;
        feed_q <= 2'd1;
      end

      if (take6) v6_q <= 1'b0;
      if (csf_out_valid && csf_slot_q == 3'd5) begin
        v6_q       <= 1'b1;
        rot_busy_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take3) begin
      op_d_q    <= d3_q;
      rot_s0_q  <= s0_3_q;
      rot_s4_q  <= s4_3_q;
      rot_tag_q <= tag3_q;
    end
    if (rot_busy_q && c_done) begin
      hx_q <= c_xout;
      hy_q <= c_yout;
    end
    csf_slot_q <= feed_slot;
    if (feed_q != 2'd0 && bypass_now) sc_q[feed_slot] <= csf_in;
    if (csf_out_valid) sc_q[csf_slot_q] <= csf_out;
    if (csf_out_valid && csf_slot_q == 3'd5) begin
      st6_s0_q  <= rot_s0_q;
      st6_s4_q  <= rot_s4_q;
      st6_tag_q <= rot_tag_q;
    end
  end

  // ------------------------------------------------------------------
  // Stages 7-9: odd butterflies and shared output scaling
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {BE_IDLE, BE_FEED, BE_DRAIN, BE_OUT} be_state_e;
  be_state_e        be_q;
  logic [1:0]       be_cnt_q;
  word_t            p_q [DCT_N];      // stage 7 results, index = coefficient
  word_t            r_q [DCT_N];      // scaled results
  logic [TAG_W-1:0] be_tag_q;

  logic             sf1_in_valid, sf1_out_valid;
  word_t            sf1_in, sf1_out;
  logic [2:0]       sf1_sel, sf1_idx_q;
  logic             sf2_in_valid, sf2_out_valid;
  word_t            sf2_in, sf2_out;
  logic             sf2_idx_q;        // 0: X2, 1: X6

  assign take6 = v6_q && (be_q == BE_IDLE);

  // order in which X0, X4, X1, X7 share scale_factor_1
  always_comb begin
    unique case (be_cnt_q)
      2'd0:    sf1_sel = 3'd0;
      2'd1:    sf1_sel = 3'd4;
      2'd2:    sf1_sel = 3'd1;
      default: sf1_sel = 3'd7;
    endcase
  end

  assign sf1_in_valid = (be_q == BE_FEED);
  assign sf1_in       = p_q[sf1_sel];
  assign sf2_in_valid = EVEN_SF2 && (be_q == BE_FEED) && (be_cnt_q < 2'd2);
  assign sf2_in       = be_cnt_q[0] ? p_q[6] : p_q[2];

  scale_factor_1 #(.W(W)) u_sf1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sf1_in_valid),
    .x         (sf1_in),
    .out_valid (sf1_out_valid),
    .x_out     (sf1_out)
  );

  scale_factor_2 #(.W(W)) u_sf2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sf2_in_valid),
    .x         (sf2_in),
    .out_valid (sf2_out_valid),
    .x_out     (sf2_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      be_q     <= BE_IDLE;
      be_cnt_q <= '0;
    end else begin
      unique case (be_q)
        BE_IDLE:  if (take6) begin
                    be_q     <= BE_FEED;
                    be_cnt_q <= '0;
                  end
        BE_FEED:  begin
                    be_cnt_q <= be_cnt_q + 2'd1;
                    if (be_cnt_q == 2'd3) be_q <= BE_DRAIN;
                  end
        BE_DRAIN: be_q <= BE_OUT;
        BE_OUT:   if (out_ready) be_q <= BE_IDLE;
        default:  be_q <= BE_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (take6) begin
      p_q[0]   <= st6_s0_q;
      p_q[4]   <= st6_s4_q;
      p_q[2]   <= sc_q[1];
      p_q[6]   <= sc_q[0];
      p_q[1]   <= (sc_q[2] + sc_q[5]) + (sc_q[3] + sc_q[4]);
      p_q[7]   <= (sc_q[2] + sc_q[5]) - (sc_q[3] + sc_q[4]);
      p_q[3]   <= sc_q[2] - sc_q[5];
      p_q[5]   <= sc_q[3] - sc_q[4];
      be_tag_q <= st6_tag_q;
    end
    if (be_q == BE_FEED && be_cnt_q == 2'd0) begin
      r_q[3] <= p_q[3] >>> 1;
      r_q[5] <= p_q[5] >>> 1;
      if (!EVEN_SF2) begin
        r_q[2] <= p_q[2] >>> 1;
        r_q[6] <= p_q[6] >>> 1;
      end
    end
    sf1_idx_q <= sf1_sel;
    sf2_idx_q <= be_cnt_q[0];
    if (sf1_out_valid) r_q[sf1_idx_q] <= sf1_out;
    if (sf2_out_valid) r_q[sf2_idx_q ? 6 : 2] <= sf2_out;
  end

  // round to nearest, saturate to DATA_W
  function automatic logic signed [DATA_W-1:0] round_sat(word_t v);
    word_t r;
    r = (v + (word_t'(1) <<< (FRAC - 1))) >>> FRAC;
    if (r > word_t'((1 <<< (DATA_W - 1)) - 1))   return {1'b0, {(DATA_W-1){1'b1}}};
    else if (r < -word_t'(1 <<< (DATA_W - 1)))   return {1'b1, {(DATA_W-1){1'b0}}};
    else                                         return r[DATA_W-1:0];
  endfunction

  assign out_valid = (be_q == BE_OUT);
  assign out_tag   = be_tag_q;
  always_comb begin
    for (int k = 0; k < DCT_N; k++) out_x[k] = round_sat(r_q[k]);
  end

  // A new CORDIC rotation may only be started when the unit is idle or just
  // finished; the scaler pair must be drained before the next result lands.
  a_cordic_free: assert property (@(posedge clk) disable iff (!rst_n)
                                  c_start |-> (!c_busy || c_done))
    else $error("dct1d: CORDIC started while busy");

  // a result that is not taken stays on the outputs
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (out_valid && !out_ready) |=> (out_valid && $stable(out_tag)))
    else $error("dct1d: result dropped before out_ready");

endmodule
