// hybrid_encoder: the "proposed encoder" of the hybrid-encoded multiplier.
//
// It looks at the multiplier operand q and decides how the product M*q is to
// be formed. If q holds at most three 1s it is encoded as one word: the
// category (A..F of the encoding rule table) and the 0-based positions p0 < p1
// < p2 of its 1s. Otherwise q is split into a low and a high half of N/2 bits
// and each half is encoded on its own: a half with at most three 1s gets a
// category, a half with more than three gets radix-4 Booth recoding. The
// splitting rule and the categories follow the source design; the position outputs
// and the choice of equal halves are this design's own.
//
// Ports: q is the multiplier. split tells whether q was cut in halves; for
// segment s (0 = whole word or low half, 1 = high half) seg_cat[s] is its
// category and seg_p0/p1/p2[s] the positions of its first three 1s, counted
// from the segment's own bit 0. ones is the number of 1s in q.
// Timing: purely combinational.
module hybrid_encoder
  import mac_pkg::*;
#(
  parameter int N  = 8,
  parameter int PW = $clog2(N)
) (
  input  logic [N-1:0]        q,
  output logic                split,
  output cat_e                seg_cat [2],
  output logic [PW-1:0]       seg_p0  [2],
  output logic [PW-1:0]       seg_p1  [2],
  output logic [PW-1:0]       seg_p2  [2],
  output logic [$clog2(N+1)-1:0] ones
);

  localparam int H = N / 2;

  typedef struct packed {
    cat_e          cat;
    logic [PW-1:0] p0;
    logic [PW-1:0] p1;
    logic [PW-1:0] p2;
  } seg_code_t;

  function automatic int count_ones(input logic [N-1:0] v);
    int c = 0;
    for (int b = 0; b < N; b++) c += int'(v[b]);
    return c;
  endfunction

  // Encode a segment (zero-extended to N bits) by the number and place of its 1s.
  function automatic seg_code_t encode(input logic [N-1:0] v);
    seg_code_t r;
    int        found;
    r     = '{cat: CAT_NONE, p0: '0, p1: '0, p2: '0};
    found = 0;
    for (int b = 0; b < N; b++) begin
      if (v[b]) begin
        if (found == 0) r.p0 = PW'(b);
        if (found == 1) r.p1 = PW'(b);
        if (found == 2) r.p2 = PW'(b);
        found++;
      end
    end
    case (found)
      0:       r.cat = CAT_NONE;
      1:       r.cat = (r.p0 == '0) ? CAT_A : CAT_B;
      2:       r.cat = (r.p0 == '0) ? CAT_C : CAT_D;
      3:       r.cat = (r.p0 == '0) ? CAT_E : CAT_F;
      default: r.cat = CAT_BOOTH;
    endcase
    return r;
  endfunction

  seg_code_t whole, lo, hi;

  always_comb begin
    ones  = ($clog2(N+1))'(count_ones(q));
    whole = encode(q);
    lo    = encode({{(N-H){1'b0}}, q[H-1:0]});
    hi    = encode({{H{1'b0}}, q[N-1:H]});
    split = (whole.cat == CAT_BOOTH);
    if (!split) begin
      seg_cat[0] = whole.cat; seg_p0[0] = whole.p0; seg_p1[0] = whole.p1; seg_p2[0] = whole.p2;
      seg_cat[1] = CAT_NONE;  seg_p0[1] = '0;       seg_p1[1] = '0;       seg_p2[1] = '0;
    end else begin
      seg_cat[0] = lo.cat; seg_p0[0] = lo.p0; seg_p1[0] = lo.p1; seg_p2[0] = lo.p2;
      seg_cat[1] = hi.cat; seg_p0[1] = hi.p0; seg_p1[1] = hi.p1; seg_p2[1] = hi.p2;
    end
  end

endmodule
