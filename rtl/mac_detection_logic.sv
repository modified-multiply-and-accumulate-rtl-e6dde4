// mac_detection_logic: classifies each incoming pixel for the MAC.
//
// A pixel entering the MAC is compared, before it is registered, with the
// special cases that let the MAC skip work:
//   PIX_ZERO  - the pixel is 0: neither multiplier nor adder is needed;
//   PIX_ONE   - the pixel is 1: the product is the constant itself;
//   PIX_REUSE - pixel and constant equal those of the last product formed, so
//               the product register already holds the result;
//   PIX_MUL   - anything else: multiply.
// Zero has priority over one, one over reuse. The reference pair is taken
// from every pixel classified PIX_MUL or PIX_ONE, i.e. from every pixel that
// reloads the product register, in the order they reach it. The source design
// states the reuse condition on the pixel value only; comparing the constant
// as well keeps the result exact when the constant changes, and is this
// design's addition.
//
// Ports: clk, rst_n (asynchronous, active low), in_valid, pixel, coef in;
// pix_class out (combinational from the inputs and the reference registers).
module mac_detection_logic
  import mac_pkg::*;
#(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] pixel,
  input  logic [N-1:0] coef,
  output pix_class_e   pix_class
);

  logic         ref_valid;
  logic [N-1:0] ref_pix, ref_coef;

  always_comb begin
    if (pixel == '0)
      pix_class = PIX_ZERO;
    else if (pixel == N'(1))
      pix_class = PIX_ONE;
    else if (ref_valid && pixel == ref_pix && coef == ref_coef)
      pix_class = PIX_REUSE;
    else
      pix_class = PIX_MUL;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_valid <= 1'b0;
      ref_pix   <= '0;
      ref_coef  <= '0;
    end else if (in_valid && (pix_class == PIX_MUL || pix_class == PIX_ONE)) begin
      ref_valid <= 1'b1;
      ref_pix   <= pixel;
      ref_coef  <= coef;
    end
  end

endmodule
