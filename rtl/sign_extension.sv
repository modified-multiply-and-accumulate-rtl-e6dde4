// sign_extension: turns the partial-product magnitudes into full-width rows
// that can be summed modulo 2^(2N).
//
// A Booth digit of -1 or -2 needs the negative of its row. Because every
// magnitude arrives zero-extended to the full 2N-bit product width, inverting
// all of its bits gives the one's complement with the sign already extended
// across the upper columns; the missing +1 of the two's complement is added
// separately as a carry by the glue circuit. Rows not selected pass unchanged.
// The source design names a sign-extension unit steered by the glue circuit; this
// inversion scheme is this design's way of realising it.
//
// Ports: row_mag[r] magnitude, sx_en[r] negate-and-extend enable from the glue
// circuit, row_out[r] the row given to the compressor. Combinational.
module sign_extension #(
  parameter int N     = 8,
  parameter int NROWS = 6
) (
  input  logic [2*N-1:0] row_mag [NROWS],
  input  logic           sx_en   [NROWS],
  output logic [2*N-1:0] row_out [NROWS]
);

  always_comb begin
    for (int r = 0; r < NROWS; r++)
      row_out[r] = sx_en[r] ? ~row_mag[r] : row_mag[r];
  end

endmodule
