// pp_compression: carry-save partial-product compressor with row bypassing.
//
// The rows are added one after the other into a sum vector and a carry vector
// by a row of full-adder cells per partial product (3:2 carry-save adders), so
// no carry ripples inside the compressor. A row whose enable is low (its
// partial product is zero) is bypassed: the inputs of its adder row are held
// at zero, so that row does not switch, and a multiplexer passes the incoming
// sum and carry vectors around it. The carry vector is shifted one column left
// per stage; what leaves the top column is dropped (modulo 2^W arithmetic).
// Carry-save compression and row bypassing follow the source design; the linear
// chain of 3:2 rows is this design's choice.
//
// Ports: rows[r] and row_en[r] per input row; sum_o and carry_o for the final
// adder. Combinational.
module pp_compression #(
  parameter int W    = 16,
  parameter int NIN  = 7
) (
  input  logic [W-1:0] rows   [NIN],
  input  logic         row_en [NIN],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);

  logic [W-1:0] s_chain [NIN+1];
  logic [W-1:0] c_chain [NIN+1];

  assign s_chain[0] = '0;
  assign c_chain[0] = '0;

  for (genvar r = 0; r < NIN; r++) begin : g_row
    logic [W-1:0] xa, xb, xc, fs, fc;
    // Frozen inputs when the row is bypassed.
    assign xa = row_en[r] ? s_chain[r] : '0;
    assign xb = row_en[r] ? c_chain[r] : '0;
    assign xc = row_en[r] ? rows[r]    : '0;
    for (genvar b = 0; b < W; b++) begin : g_col
      full_adder u_fa (.a(xa[b]), .b(xb[b]), .c(xc[b]), .s(fs[b]), .co(fc[b]));
    end
    assign s_chain[r+1] = row_en[r] ? fs : s_chain[r];
    assign c_chain[r+1] = row_en[r] ? {fc[W-2:0], 1'b0} : c_chain[r];
    // The carry out of the top column is outside the product and dropped.
    logic unused_carry;
    assign unused_carry = fc[W-1];
  end

  assign sum_o   = s_chain[NIN];
  assign carry_o = c_chain[NIN];

endmodule
