// final_adder: carry-propagate adder with column bypassing.
//
// It adds the compressor's sum and carry vectors and the glue circuit's
// carry-in in a ripple chain of full-adder cells. Columns above the effective
// product width, which the detection logic finds from the operands' leading
// zeros, cannot hold a 1 of the product; the asserting circuit clears their
// enables, the adder cells of those columns get zero inputs and do not
// switch, and their result bits and carries are forced to 0. The lower
// columns are not affected by the upper ones, so the product stays exact.
// Column bypassing is the source design's; the choice of which columns to bypass
// (those above the effective width) is this design's.
//
// Ports: a, b addends, cin carry-in, col_en per-column enable, s the W-bit
// result, cout the carry out of the top column (dropped by the glue circuit's
// modulo rule). Combinational.
module final_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic [W-1:0] col_en,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;
  assign c[0] = cin & col_en[0];

  for (genvar i = 0; i < W; i++) begin : g_col
    logic fs, fc;
    full_adder u_fa (
      .a (a[i] & col_en[i]),
      .b (b[i] & col_en[i]),
      .c (c[i] & col_en[i]),
      .s (fs),
      .co(fc)
    );
    assign s[i]   = col_en[i] & fs;
    assign c[i+1] = col_en[i] & fc;
  end

  assign cout = c[W];

endmodule
