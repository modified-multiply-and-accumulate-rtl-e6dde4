// mac_asserting_circuit: sequences the MAC's registers and adder from the
// detection logic's classification.
//
// The MAC is a three-stage pipeline: Latch 1 (operand register) -> multiplier
// -> Latch 2 (product register) -> adder -> accumulator. This circuit carries
// each pixel's class and its window-start/window-end marks down the pipeline
// and derives the enables:
//   latch1_en - load the operand register only for PIX_MUL, so the multiplier
//               inputs stay frozen otherwise;
//   const_en  - load the constant bypass register for PIX_ONE;
//   latch2_en - load the product register one cycle later for PIX_MUL (from
//               the multiplier) or PIX_ONE (from the bypass, latch2_sel_const);
//               PIX_REUSE and PIX_ZERO leave it as it is;
//   acc_op    - two cycles after entry: PIX_ZERO holds the accumulator (or
//               clears it at a window start); the others add the product
//               register, or load it at a window start;
//   out_valid - high for one cycle with the finished sum of a window.
// The enables and the rules behind them follow the source design's list of special
// cases; the pipeline depth and the window marks are this design's choice.
//
// Ports: clk, rst_n (asynchronous, active low); in_valid, in_first, in_last,
// pix_class in; the enables above out. Timing: a pixel presented in cycle t
// sets latch1_en/const_en in t, latch2_en in t+1 and acc_op in t+2; out_valid
// is high in cycle t+3 after a window's last pixel. One pixel per cycle.
module mac_asserting_circuit
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_first,
  input  logic       in_last,
  input  pix_class_e pix_class,
  output logic       latch1_en,
  output logic       const_en,
  output logic       latch2_en,
  output logic       latch2_sel_const,
  output acc_op_e    acc_op,
  output logic       out_valid
);

  typedef struct packed {
    logic       valid;
    logic       first;
    logic       last;
    pix_class_e cls;
  } stage_t;

  stage_t s1, s2;

  assign latch1_en        = in_valid && (pix_class == PIX_MUL);
  assign const_en         = in_valid && (pix_class == PIX_ONE);
  assign latch2_en        = s1.valid && (s1.cls == PIX_MUL || s1.cls == PIX_ONE);
  assign latch2_sel_const = (s1.cls == PIX_ONE);

  always_comb begin
    if (!s2.valid)
      acc_op = ACC_HOLD;
    else if (s2.cls == PIX_ZERO)
      acc_op = s2.first ? ACC_CLEAR : ACC_HOLD;
    else
      acc_op = s2.first ? ACC_LOAD : ACC_ADD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1        <= '0;
      s2        <= '0;
      out_valid <= 1'b0;
    end else begin
      s1        <= '{valid: in_valid, first: in_first, last: in_last, cls: pix_class};
      s2        <= s1;
      out_valid <= s2.valid && s2.last;
    end
  end

endmodule
