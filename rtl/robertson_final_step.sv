// robertson_final_step: the correcting last pass of Robertson's multiplier.
//
// After N-1 add-and-shift passes only the sign bit of the multiplier b is left
// in m_in[0].  In two's complement that bit weighs -2^(N-1), so when it is 1
// the multiplicand is subtracted rather than added.  The four branches are:
//   b(N-1)=0, m(0)=1 : P <- P + a, then shift
//   b(N-1)=0, m(0)=0 : shift only
//   b(N-1)=1, m(0)=1 : P <- P - a, then shift (the correction step)
//   b(N-1)=1, m(0)=0 : shift only
// The shift copies the sign of P into the top bit, as in every other pass.
// The low 2N bits of the shifted register are the signed product.
//
// Interface and timing: purely combinational; mul settles one (N+1)-bit
// add/subtract delay after its inputs.
//
// From the document: the four branches on b(N-1) and m(0) and the final
// subtraction (Fig. 1, right-hand branch; text cases ii and iv).  This design's
// own choice: one shared adder that adds a or its two's complement, and the
// guard bit on P (see robertson_add_shift).
module robertson_final_step #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic           b_msb,
  input  logic [2*N:0]   m_in,
  output logic [2*N-1:0] mul
);

  logic signed [N:0] p_cur;
  logic signed [N:0] a_ext;
  logic signed [N:0] operand;  // +a, -a or 0
  logic signed [N:0] p_new;

  always_comb begin
    p_cur = m_in[2*N:N];
    a_ext = {a[N-1], a};
    if (!m_in[0])
      operand = '0;
    else if (b_msb)
      operand = -a_ext;        // correction: P <- P - a
    else
      operand = a_ext;         // P <- P + a
    p_new   = p_cur + operand;
    // shift right; the sign copy above p_new[N] lies outside the product
    mul     = {p_new, m_in[N-1:1]};
  end

endmodule
