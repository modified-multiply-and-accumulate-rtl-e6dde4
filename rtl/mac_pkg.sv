// mac_pkg: types and constants shared by the hybrid-encoded multiplier and
// the low-power multiply-accumulate unit built around it.
//
// The multiplier operand (the pixel) is 8 bits wide and the multiplicand (the
// kernel constant) is 8 bits wide, as in the worked 41H x 22H example. The
// hybrid encoder describes each multiplier segment with a category taken from
// the encoding rule table (A..F), or marks it for radix-4 Booth recoding when
// the segment holds more than three 1s. Bit positions are 0-based here; the
// table counts bits from 1, so its "i-1" is this package's "i".
package mac_pkg;

  // Encoding category of one multiplier segment.
  typedef enum logic [2:0] {
    CAT_NONE  = 3'd0,  // no 1s: the segment contributes nothing
    CAT_A     = 3'd1,  // one 1 in bit 0:            M
    CAT_B     = 3'd2,  // one 1 in bit i>0:           M << i
    CAT_C     = 3'd3,  // 1s in bit 0 and bit i:      (M << i) + M
    CAT_D     = 3'd4,  // 1s in bits i and i+j:       ((M << j) + M) << i
    CAT_E     = 3'd5,  // 1s in bits 0, j and k
    CAT_F     = 3'd6,  // 1s in bits i>0, j and k
    CAT_BOOTH = 3'd7   // more than three 1s: radix-4 Booth recoding
  } cat_e;

  // Operation applied to the accumulator by the MAC adder.
  typedef enum logic [1:0] {
    ACC_HOLD  = 2'd0,   // adder frozen, accumulator kept (pixel 0, idle)
    ACC_ADD   = 2'd1,   // accumulator += product register
    ACC_LOAD  = 2'd2,  // accumulator  = product register (first pixel of a window)
    ACC_CLEAR = 2'd3   // accumulator  = 0 (first pixel of a window is 0)
  } acc_op_e;

  // How a pixel is handled by the MAC, decided when it enters.
  typedef enum logic [1:0] {
    PIX_MUL   = 2'd0,  // multiply in the low-power multiplier
    PIX_REUSE = 2'd1,  // same pixel and constant as the last product: reuse it
    PIX_ZERO  = 2'd2,  // pixel is 0: multiplier and adder both skipped
    PIX_ONE   = 2'd3   // pixel is 1: multiplier skipped, constant passed on
  } pix_class_e;

endpackage
