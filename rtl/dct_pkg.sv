// dct_pkg: constants and types shared by the CORDIC-based Loeffler DCT.
//
// The transform size (8 points), the 12-bit sample width and the eleven
// CORDIC iterations with their fixed rotation directions are taken from the
// design description. The rotation-direction table below is the whole CORDIC
// "angle" datapath: since the three rotation angles of the 8-point Loeffler
// flow graph are constants, no angle accumulator is built; the sign of every
// micro-rotation is read from this table instead.
//
// Bit i of SIGMA_NEG[a] is 1 when sigma_i = -1 for angle a, 0 when
// sigma_i = +1. With alpha_i = atan(2^-i), the signed sums of alpha_i give
// 67.50, 33.73 and 11.25 degrees for the three rows.
package dct_pkg;

  localparam int unsigned DCT_N    = 8;   // points per 1-D transform
  localparam int unsigned SAMPLE_W = 12;  // sample / coefficient width
  localparam int unsigned MAX_ITER = 11;  // CORDIC iterations held in the table

  // The three constant rotations of the flow graph, in the order the shared
  // CORDIC processes them.
  typedef enum logic [1:0] {
    ANG_3PI_8  = 2'd0,  // even part: outputs X2 and X6
    ANG_3PI_16 = 2'd1,  // odd part: rotation of (x0-x7, x3-x4)
    ANG_PI_16  = 2'd2   // odd part: rotation of (x1-x6, x2-x5)
  } angle_e;

  // sigma = -1 marks, iteration 0 in bit 0.
  //   3pi/8 : + + - + + - + + - - +
  //   3pi/16: + - + + - - - + - + +
  //   pi/16 : + - - + - + + + + - +
  localparam logic [MAX_ITER-1:0] SIGMA_NEG_3PI_8  = 11'b011_0010_0100;
  localparam logic [MAX_ITER-1:0] SIGMA_NEG_3PI_16 = 11'b001_0111_0010;
  localparam logic [MAX_ITER-1:0] SIGMA_NEG_PI_16  = 11'b010_0001_0110;

  function automatic logic sigma_is_neg(angle_e ang, logic [3:0] iter);
    logic [MAX_ITER-1:0] row;
    unique case (ang)
      ANG_3PI_8:  row = SIGMA_NEG_3PI_8;
      ANG_3PI_16: row = SIGMA_NEG_3PI_16;
      default:    row = SIGMA_NEG_PI_16;
    endcase
    return (iter < 4'(MAX_ITER)) ? row[iter] : 1'b0;
  endfunction

endpackage
