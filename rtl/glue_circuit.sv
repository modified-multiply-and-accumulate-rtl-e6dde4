// glue_circuit: carry and sign control between the row logic and the adders.
//
// It tells the sign-extension unit which active rows are negated Booth digits
// and supplies the +1 corrections those one's-complement rows still need. With
// k negated rows, one correction enters the final adder as its carry-in and
// the other k-1 as a small extra row for the compressor, so no extra adder
// stage is needed. Carries out of the top product column are dropped: the sum
// is formed modulo 2^(2N), which the sign-extended rows require. The source design
// only says that a glue circuit controls the carry and the sign-extension
// unit; the exact split of corrections is this design's choice.
//
// Ports: row_neg/row_en per row; sx_en to the sign-extension unit; corr_row
// (k-1 when k > 0) to the compressor; fa_cin to the final adder. Combinational.
module glue_circuit #(
  parameter int N     = 8,
  parameter int NROWS = 6
) (
  input  logic           row_neg [NROWS],
  input  logic           row_en  [NROWS],
  output logic           sx_en   [NROWS],
  output logic [2*N-1:0] corr_row,
  output logic           fa_cin
);

  always_comb begin
    int k;
    k = 0;
    for (int r = 0; r < NROWS; r++) begin
      sx_en[r] = row_neg[r] & row_en[r];
      k += int'(sx_en[r]);
    end
    fa_cin   = (k != 0);
    corr_row = (k != 0) ? (2*N)'(k - 1) : '0;
  end

endmodule
