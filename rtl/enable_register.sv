// enable_register: the MAC's pipeline registers ("Latch 1" in front of the
// multiplier and "Latch 2" behind it).
//
// A W-bit register that loads d on a rising clock edge when en is high and
// otherwise keeps its value, so that the logic it feeds sees no transitions.
// The asserting circuit drives en. Asynchronous active-low reset to 0 (the
// reset style is this design's choice; the source design does not give one).
//
// Ports: clk, rst_n, en, d in; q out. Timing: q follows d one cycle after en.
module enable_register #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
