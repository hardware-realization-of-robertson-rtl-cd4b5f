// robertson_add_shift: one add-and-shift pass of Robertson's signed multiplier.
//
// The working register m_in holds the partial product P (signed, N+1 bits,
// m_in[2N:N]) above the multiplier bits still to be consumed (m_in[N-1:0]).
// If the multiplier bit in m_in[0] is 1, the multiplicand a (two's complement,
// sign-extended to N+1 bits) is added to P; otherwise P passes unchanged.  The
// whole register is then shifted right by one place, and the sign of the new
// partial product is copied into the top bit.  So leading 0s enter while P is
// non-negative and leading 1s once a negative multiplicand has been added,
// which is how the method handles a negative multiplicand.
//
// Interface and timing: purely combinational, no clock; m_out settles one
// (N+1)-bit adder delay after a and m_in.
//
// From the document: the test of m(0), the conditional add of a into the upper
// half of m, and the one-place right shift of the whole register (Fig. 1,
// left-hand loop).  This design's own choice: the extra guard bit on P, so that
// the shifted-in bit is the true sign even when P + a exceeds N bits.
module robertson_add_shift #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [2*N:0]   m_in,
  output logic [2*N:0]   m_out
);

  logic signed [N:0] p_cur;   // partial product before the pass
  logic signed [N:0] a_ext;   // multiplicand sign-extended to N+1 bits
  logic signed [N:0] p_sum;   // partial product after the conditional add

  always_comb begin
    p_cur = m_in[2*N:N];
    a_ext = {a[N-1], a};
    p_sum = m_in[0] ? p_cur + a_ext : p_cur;
    // arithmetic right shift of {P, multiplier bits}
    m_out = {p_sum[N], p_sum, m_in[N-1:1]};
  end

endmodule
