// lp_adder: the MAC's low-power accumulate adder.
//
// A W-bit ripple-carry adder built from the low-power full-adder cell, with
// the accumulator it feeds back into. The control input from the asserting
// circuit selects what happens each clock:
//   ACC_HOLD  - both adder inputs are held at zero (the adder is frozen) and
//               the accumulator keeps its value;
//   ACC_ADD   - accumulator <= accumulator + addend;
//   ACC_LOAD  - accumulator <= addend (the feedback input is frozen at zero),
//               used for the first pixel of a window;
//   ACC_CLEAR - accumulator <= 0 (first pixel of a window is zero).
// The feedback loop and the control input follow the source design's MAC architecture;
// the four operations, the ripple structure and the reset are this design's.
//
// Ports: clk, rst_n (asynchronous, active low), op, addend (the product
// register), acc (accumulator, the MAC output). Timing: acc is updated on the
// clock edge that ends the cycle in which op and addend are presented.
module lp_adder
  import mac_pkg::*;
#(
  parameter int W  = 20,
  parameter int AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  acc_op_e       op,
  input  logic [AW-1:0] addend,
  output logic [W-1:0]  acc
);

  logic [W-1:0] xa, xb, sum;
  logic [W:0]   c;

  // Operand freezing.
  assign xa = (op == ACC_ADD) ? acc : '0;
  assign xb = (op == ACC_ADD || op == ACC_LOAD) ? W'(addend) : '0;

  assign c[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(xa[i]), .b(xb[i]), .c(c[i]), .s(sum[i]), .co(c[i+1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else begin
      case (op)
        ACC_ADD, ACC_LOAD: acc <= sum;
        ACC_CLEAR:         acc <= '0;
        default:           acc <= acc;
      endcase
    end
  end

  // The carry out of the top bit is dropped: the accumulator is sized for the
  // window it has to hold.
  logic unused;
  assign unused = c[W];

endmodule
