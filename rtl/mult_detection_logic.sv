// mult_detection_logic: effective-range detector of the multiplier.
//
// It finds how many significant bits each operand has (the position of its
// highest 1, plus one) and whether an operand is zero. The product of an
// a-bit and a b-bit number fits in a+b bits, so the columns above that carry
// no information and can be frozen. The source design asks for a detection logic
// that finds the effective data range; measuring it by leading zeros is this
// design's choice.
//
// Ports: m multiplicand, q multiplier; m_len/q_len effective widths (0..N);
// m_zero/q_zero. Combinational.
module mult_detection_logic #(
  parameter int N  = 8,
  parameter int LW = $clog2(N+1)
) (
  input  logic [N-1:0]  m,
  input  logic [N-1:0]  q,
  output logic [LW-1:0] m_len,
  output logic [LW-1:0] q_len,
  output logic          m_zero,
  output logic          q_zero
);

  function automatic logic [LW-1:0] eff_len(input logic [N-1:0] v);
    logic [LW-1:0] l = '0;
    for (int b = 0; b < N; b++) if (v[b]) l = LW'(b + 1);
    return l;
  endfunction

  always_comb begin
    m_len  = eff_len(m);
    q_len  = eff_len(q);
    m_zero = (m == '0);
    q_zero = (q == '0);
  end

endmodule
