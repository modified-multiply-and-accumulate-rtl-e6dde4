// hertat_multiplier: the hybrid-encoded reduced-transition-activity multiplier.
//
// Multiplies the multiplicand m by the multiplier q (both unsigned N-bit) with
// as few partial products as their bit pattern allows. The encoder classifies
// q: with at most three 1s the whole product is one shifted-and-added partial
// product (categories A..F); otherwise q is split into halves, each giving one
// such partial product or, if it holds more than three 1s, its radix-4 Booth
// rows. Rows that are zero are bypassed in the carry-save compressor, columns
// above the operands' effective width are bypassed in the final adder, and a
// glue circuit with a sign-extension unit handles the negative Booth rows.
// Structure (encoding, multiplication, controlling) follows the block diagram
// of the source design; widths and enable rules are this design's own.
//
// Ports: m, q operands; p the 2N-bit product. For observation: split (q was
// halved), booth (a half was Booth-recoded) and rows_active (number of
// partial-product rows that were not bypassed). Timing: combinational; the
// MAC registers its inputs and its output around it.
module hertat_multiplier
  import mac_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0]            m,
  input  logic [N-1:0]            q,
  output logic [2*N-1:0]          p,
  output logic                    split,
  output logic                    booth,
  output logic [$clog2(N+2)-1:0]  rows_active
);

  localparam int PW    = $clog2(N);
  localparam int LW    = $clog2(N+1);
  localparam int R     = N / 4 + 1;
  localparam int NROWS = 2 * R;
  localparam int W     = 2 * N;

  // Encoding
  cat_e                seg_cat [2];
  logic [PW-1:0]       seg_p0  [2];
  logic [PW-1:0]       seg_p1  [2];
  logic [PW-1:0]       seg_p2  [2];
  logic [LW-1:0]       ones;

  hybrid_encoder #(.N(N)) u_enc (
    .q(q), .split(split), .seg_cat(seg_cat),
    .seg_p0(seg_p0), .seg_p1(seg_p1), .seg_p2(seg_p2), .ones(ones)
  );

  // Controlling
  logic [LW-1:0] m_len, q_len;
  logic          m_zero, q_zero;

  mult_detection_logic #(.N(N)) u_det (
    .m(m), .q(q), .m_len(m_len), .q_len(q_len), .m_zero(m_zero), .q_zero(q_zero)
  );

  logic [W-1:0] row_mag  [NROWS];
  logic         row_neg  [NROWS];
  logic         row_used [NROWS];
  logic         row_en   [NROWS];
  logic [W-1:0] col_en;

  mult_asserting_circuit #(.N(N), .NROWS(NROWS)) u_assert (
    .m_len(m_len), .q_len(q_len), .m_zero(m_zero), .q_zero(q_zero),
    .row_used(row_used), .row_en(row_en), .col_en(col_en)
  );

  logic         sx_en [NROWS];
  logic [W-1:0] corr_row;
  logic         fa_cin;

  glue_circuit #(.N(N), .NROWS(NROWS)) u_glue (
    .row_neg(row_neg), .row_en(row_en), .sx_en(sx_en), .corr_row(corr_row), .fa_cin(fa_cin)
  );

  // Multiplication
  pp_generator #(.N(N)) u_ppg (
    .m(m), .q(q), .split(split), .seg_cat(seg_cat),
    .seg_p0(seg_p0), .seg_p1(seg_p1), .seg_p2(seg_p2),
    .row_mag(row_mag), .row_neg(row_neg), .row_used(row_used)
  );

  logic [W-1:0] row_ext [NROWS];

  sign_extension #(.N(N), .NROWS(NROWS)) u_sx (
    .row_mag(row_mag), .sx_en(sx_en), .row_out(row_ext)
  );

  logic [W-1:0] cmp_rows [NROWS+1];
  logic         cmp_en   [NROWS+1];

  always_comb begin
    for (int r = 0; r < NROWS; r++) begin
      cmp_rows[r] = row_ext[r];
      cmp_en[r]   = row_en[r];
    end
    cmp_rows[NROWS] = corr_row;
    cmp_en[NROWS]   = (corr_row != '0);
  end

  logic [W-1:0] sum_v, carry_v;

  pp_compression #(.W(W), .NIN(NROWS+1)) u_cmp (
    .rows(cmp_rows), .row_en(cmp_en), .sum_o(sum_v), .carry_o(carry_v)
  );

  logic fa_cout;

  final_adder #(.W(W)) u_fadd (
    .a(sum_v), .b(carry_v), .cin(fa_cin), .col_en(col_en), .s(p), .cout(fa_cout)
  );

  always_comb begin
    int n;
    n = 0;
    for (int r = 0; r < NROWS + 1; r++) n += int'(cmp_en[r]);
    rows_active = ($clog2(N+2))'(n);
    booth = (seg_cat[0] == CAT_BOOTH) || (seg_cat[1] == CAT_BOOTH);
  end

  // fa_cout and ones are not needed by the product: the sum is taken modulo
  // 2^(2N) and the 1s count is only the encoder's internal measure.
  logic unused;
  assign unused = fa_cout ^ (^ones);

endmodule
