// robertson_multipliers: the six Robertson multipliers side by side.
//
// One combinational robertson_mult is instantiated at each of the operand
// widths 4, 6, 8, 12, 16 and 32 bits.  They share nothing: each has its own
// operand and product ports, named after its width (a8, b8 and mul8 for the
// 8 x 8-bit one), so the module brings out 4N pins per width, 312 in all.
//
// Timing: combinational, no clock; each product settles after the chain of N
// adders of its own multiplier.
//
// From the document: the set of widths and the per-width interface a, b, mul.
// This design's own choice: gathering them in one module with suffixed names.
module robertson_multipliers
  import robertson_pkg::*;
(
  input  logic [3:0]  a4,  b4,
  output logic [7:0]  mul4,
  input  logic [5:0]  a6,  b6,
  output logic [11:0] mul6,
  input  logic [7:0]  a8,  b8,
  output logic [15:0] mul8,
  input  logic [11:0] a12, b12,
  output logic [23:0] mul12,
  input  logic [15:0] a16, b16,
  output logic [31:0] mul16,
  input  logic [31:0] a32, b32,
  output logic [63:0] mul32
);

  robertson_mult #(.N(WIDTHS[0])) u_mult4  (.a(a4),  .b(b4),  .mul(mul4));
  robertson_mult #(.N(WIDTHS[1])) u_mult6  (.a(a6),  .b(b6),  .mul(mul6));
  robertson_mult #(.N(WIDTHS[2])) u_mult8  (.a(a8),  .b(b8),  .mul(mul8));
  robertson_mult #(.N(WIDTHS[3])) u_mult12 (.a(a12), .b(b12), .mul(mul12));
  robertson_mult #(.N(WIDTHS[4])) u_mult16 (.a(a16), .b(b16), .mul(mul16));
  robertson_mult #(.N(WIDTHS[5])) u_mult32 (.a(a32), .b(b32), .mul(mul32));

endmodule
