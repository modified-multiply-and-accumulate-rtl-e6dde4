// full_adder: the one-bit adder cell used by every adder in the design.
//
// The cell computes carry = AB + BC + CA and sum = A'B'C + A'BC' + AB'C' + ABC,
// the two sum-of-products equations the cell is defined by. The transistor
// circuit behind it (input inverters, shared sum and carry networks and a
// pull-down device that cleans up the carry output) has no logic effect and is
// not modelled; only its Boolean function is. Purely combinational, no clock.
//
// Ports: a, b, c are the three input bits; s is the sum, co the carry out.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);

  always_comb begin
    co = (a & b) | (b & c) | (c & a);
    s  = (~a & ~b &  c) | (~a &  b & ~c) | ( a & ~b & ~c) | ( a &  b &  c);
  end

endmodule
