// pp_generator: forms the partial products of the hybrid-encoded multiplier.
//
// For every multiplier segment the encoder has classified, it builds the rows
// the category calls for, each as a 2N-bit magnitude and a "negate" flag:
//   A: M                         B: M << p0
//   C: (M << p1) + M             D: ((M << (p1-p0)) + M) << p0
//   E, F: ((((M << (p2-p1)) + M) << (p1-p0)) + M) << p0
// so a segment with up to three 1s yields a single partial product (the
// shift-and-add chain of the encoding rule table). A Booth segment of H bits
// yields H/2+1 radix-4 digits in {-2,-1,0,+1,+2} from the overlapping bit
// triples (a virtual 0 below the segment, 0s above it), one row per digit.
// A high-half segment is shifted left by N/2. Row s*R+t belongs to segment s,
// digit t (R = N/4+1); category rows use t = 0.
// For category F the rule table's last shift reads "left by i" where the other
// categories use "i-1"; this module uses i-1 (p0) for F too, the only reading
// that gives the product.
//
// Ports: m is the multiplicand, q the multiplier, split/seg_* come from the
// encoder. row_mag[r] is a row's magnitude, row_neg[r] says it is subtracted,
// row_used[r] that it is non-zero. Timing: purely combinational.
module pp_generator
  import mac_pkg::*;
#(
  parameter int N     = 8,
  parameter int PW    = $clog2(N),
  parameter int R     = N / 4 + 1,
  parameter int NROWS = 2 * R
) (
  input  logic [N-1:0]   m,
  input  logic [N-1:0]   q,
  input  logic           split,
  input  cat_e           seg_cat [2],
  input  logic [PW-1:0]  seg_p0  [2],
  input  logic [PW-1:0]  seg_p1  [2],
  input  logic [PW-1:0]  seg_p2  [2],
  output logic [2*N-1:0] row_mag [NROWS],
  output logic           row_neg [NROWS],
  output logic           row_used[NROWS]
);

  localparam int H = N / 2;
  localparam int W = 2 * N;

  logic [W-1:0] mw;
  assign mw = W'(m);

  always_comb begin
    logic [W-1:0]   t;
    logic [H+2:0]   seg;   // segment bits, a virtual 0 below (bit 0), 0s above
    logic [2:0]     trip;
    int             base;
    t    = '0;
    seg  = '0;
    trip = '0;
    base = 0;
    for (int r = 0; r < NROWS; r++) begin
      row_mag[r]  = '0;
      row_neg[r]  = 1'b0;
      row_used[r] = 1'b0;
    end
    for (int s = 0; s < 2; s++) begin
      base = (s == 1) ? H : 0;
      t    = '0;
      case (seg_cat[s])
        CAT_A: t = mw;
        CAT_B: t = mw << seg_p0[s];
        CAT_C: t = (mw << seg_p1[s]) + mw;
        CAT_D: t = ((mw << (seg_p1[s] - seg_p0[s])) + mw) << seg_p0[s];
        CAT_E, CAT_F:
               t = ((((mw << (seg_p2[s] - seg_p1[s])) + mw) << (seg_p1[s] - seg_p0[s])) + mw)
                   << seg_p0[s];
        default: t = '0;
      endcase
      if (seg_cat[s] != CAT_NONE && seg_cat[s] != CAT_BOOTH) begin
        row_mag[s*R]  = t << base;
        row_used[s*R] = 1'b1;
      end
      if (seg_cat[s] == CAT_BOOTH && split) begin
        seg = '0;
        for (int b = 0; b < H; b++) seg[b+1] = q[base + b];
        for (int d = 0; d < R; d++) begin
          trip = {seg[2*d+2], seg[2*d+1], seg[2*d]};
          case (trip)
            3'b001, 3'b010: begin row_mag[s*R+d] = mw;      row_neg[s*R+d] = 1'b0; end
            3'b011:         begin row_mag[s*R+d] = mw << 1; row_neg[s*R+d] = 1'b0; end
            3'b100:         begin row_mag[s*R+d] = mw << 1; row_neg[s*R+d] = 1'b1; end
            3'b101, 3'b110: begin row_mag[s*R+d] = mw;      row_neg[s*R+d] = 1'b1; end
            default:        begin row_mag[s*R+d] = '0;      row_neg[s*R+d] = 1'b0; end
          endcase
          row_mag[s*R+d]  = row_mag[s*R+d] << (2*d + base);
          row_used[s*R+d] = (trip != 3'b000) && (trip != 3'b111);
        end
      end
    end
  end

endmodule
