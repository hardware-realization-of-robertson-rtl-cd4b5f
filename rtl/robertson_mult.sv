// robertson_mult: N x N-bit signed multiplier by Robertson's method.
//
// Both operands are two's complement.  The working register starts as N+1
// zero bits above the multiplier b.  N-1 copies of robertson_add_shift then
// each consume one multiplier bit, from b(0) upwards: add the multiplicand a
// to the partial product when the bit is 1, and shift right, shifting in the
// partial product's sign.  A last robertson_final_step handles the sign bit
// b(N-1), subtracting a when b is negative, and yields mul = a * b.
//
// Interface: a and b in, mul (2N bits) out, no clock, as in the block
// diagrams of the 4- to 32-bit realizations.  Timing: combinational; the
// critical path runs through N adders of N+1 bits in series, so the delay
// grows linearly with N.
//
// From the document: the algorithm, the loop count of N-1 passes followed by
// the final branch on b(N-1), the operand roles (a added, b shifted out of the
// low half of m), the port names and widths, and the absence of a clock.  This
// design's own choice: the loop is written as an unrolled chain of modules, and
// the partial product carries one guard bit.
module robertson_mult
  import robertson_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] mul
);

  localparam int unsigned W = wreg_width(N);

  // m_chain[i] is the working register before pass i
  logic [W-1:0] m_chain [N];

  assign m_chain[0] = {{(N+1){1'b0}}, b};

  for (genvar i = 0; i < N - 1; i++) begin : g_pass
    robertson_add_shift #(.N(N)) u_pass (
      .a     (a),
      .m_in  (m_chain[i]),
      .m_out (m_chain[i+1])
    );
  end

  robertson_final_step #(.N(N)) u_final (
    .a     (a),
    .b_msb (b[N-1]),
    .m_in  (m_chain[N-1]),
    .mul   (mul)
  );

  initial begin
    assert (N >= 2) else $error("robertson_mult: N must be at least 2");
  end

endmodule
