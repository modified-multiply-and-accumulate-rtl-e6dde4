// mult_asserting_circuit: turns the multiplier's detection results into the
// enables of its row-bypass and column-bypass logic.
//
// A partial-product row is enabled only if the generator marks it non-zero and
// neither operand is zero. A final-adder column is enabled only below the
// effective product width m_len + q_len. With a zero operand everything is
// frozen and the product reads 0. The enable rules are this design's; the
// source design names the asserting circuit and what it drives.
//
// Ports: detection results in, row_used from the generator, row_en to the
// glue circuit and compressor, col_en to the final adder. Combinational.
module mult_asserting_circuit #(
  parameter int N     = 8,
  parameter int NROWS = 6,
  parameter int LW    = $clog2(N+1)
) (
  input  logic [LW-1:0]  m_len,
  input  logic [LW-1:0]  q_len,
  input  logic           m_zero,
  input  logic           q_zero,
  input  logic           row_used [NROWS],
  output logic           row_en   [NROWS],
  output logic [2*N-1:0] col_en
);

  always_comb begin
    int width;
    width = int'(m_len) + int'(q_len);
    for (int r = 0; r < NROWS; r++)
      row_en[r] = row_used[r] & ~m_zero & ~q_zero;
    for (int c = 0; c < 2*N; c++)
      col_en[c] = (c < width) && !m_zero && !q_zero;
  end

endmodule
