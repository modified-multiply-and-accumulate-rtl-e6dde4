// hertat_mac: low-power multiply-accumulate unit for kernel (window)
// operations on images.
//
// Pixels stream in one per clock together with a kernel constant; the unit
// accumulates pixel x constant over a window marked by in_first and in_last
// and presents the window sum. To save switching it avoids work wherever the
// pixel stream allows: a detection logic classifies each pixel before it is
// registered, and an asserting circuit then
//   - skips both multiplier and adder for a 0 pixel,
//   - skips the multiplier for a 1 pixel and feeds the constant to the adder,
//   - skips the multiplier when pixel and constant repeat the last product,
//     reusing the product register,
//   - otherwise multiplies in the hybrid-encoded multiplier (which itself
//     bypasses zero partial-product rows and unused adder columns).
// Pipeline: Latch 1 (operand register) -> hybrid-encoded multiplier -> Latch 2
// (product register) -> low-power adder with accumulator feedback. This is
// the source design's MAC architecture; the constant is registered along with the
// pixel, and a small bypass register carries the constant of a 1 pixel, both
// this design's additions.
//
// Ports: clk, rst_n (asynchronous, active low); in_valid, in_first (first
// pixel of a window), in_last (last pixel), pixel, coef (the constant);
// out_valid (one cycle) with out_acc (window sum). in_first and in_last may
// only be raised together with in_valid (checked by an assertion).
// mul_split, mul_booth and mul_rows show how the multiplier is forming its
// current product (split multiplier, Booth-recoded half, partial-product rows
// not bypassed), for activity monitoring.
// Timing: one pixel per clock, no stalls. A pixel presented in cycle t is in
// Latch 1 during t+1, in Latch 2 during t+2 and in the accumulator from t+3;
// out_valid is high in cycle t+3 after the last pixel of a window.
// Adding the constant for a 1 pixel (rather than incrementing by 1, as the
// source rule reads) keeps the sum exact for any constant.
module hertat_mac
  import mac_pkg::*;
#(
  parameter int N     = 8,
  parameter int ACC_W = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [N-1:0]     pixel,
  input  logic [N-1:0]     coef,
  output logic             out_valid,
  output logic [ACC_W-1:0] out_acc,
  output logic             mul_split,
  output logic             mul_booth,
  output logic [$clog2(N+2)-1:0] mul_rows
);

  pix_class_e pix_class;

  mac_detection_logic #(.N(N)) u_det (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .pixel(pixel), .coef(coef), .pix_class(pix_class)
  );

  logic    latch1_en, const_en, latch2_en, latch2_sel_const;
  acc_op_e acc_op;

  mac_asserting_circuit u_assert (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_last(in_last),
    .pix_class(pix_class), .latch1_en(latch1_en), .const_en(const_en),
    .latch2_en(latch2_en), .latch2_sel_const(latch2_sel_const),
    .acc_op(acc_op), .out_valid(out_valid)
  );

  // Latch 1: pixel and constant for the multiplier.
  logic [2*N-1:0] l1_q;
  enable_register #(.W(2*N)) u_latch1 (
    .clk(clk), .rst_n(rst_n), .en(latch1_en), .d({pixel, coef}), .q(l1_q)
  );

  // Bypass register for the constant of a pixel equal to 1.
  logic [N-1:0] const_q;
  enable_register #(.W(N)) u_const (
    .clk(clk), .rst_n(rst_n), .en(const_en), .d(coef), .q(const_q)
  );

  logic [2*N-1:0]         product;

  // The pixel is the multiplier operand that the encoder inspects; the
  // constant is the multiplicand.
  hertat_multiplier #(.N(N)) u_mul (
    .m(l1_q[N-1:0]), .q(l1_q[2*N-1:N]), .p(product),
    .split(mul_split), .booth(mul_booth), .rows_active(mul_rows)
  );

  // Latch 2: product register.
  logic [2*N-1:0] l2_d, l2_q;
  assign l2_d = latch2_sel_const ? (2*N)'(const_q) : product;

  enable_register #(.W(2*N)) u_latch2 (
    .clk(clk), .rst_n(rst_n), .en(latch2_en), .d(l2_d), .q(l2_q)
  );

  lp_adder #(.W(ACC_W), .AW(2*N)) u_add (
    .clk(clk), .rst_n(rst_n), .op(acc_op), .addend(l2_q), .acc(out_acc)
  );

  // Input framing rule: window marks are only meaningful on a valid pixel.
  a_marks_need_valid: assert property (
    @(posedge clk) (in_first || in_last) |-> in_valid
  ) else $error("in_first/in_last asserted without in_valid");

endmodule
