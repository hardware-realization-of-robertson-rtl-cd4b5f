// tb_robertson_mult: self-checking test of the N x N-bit signed multiplier.
//
// Three instances: the default N = 8 and N = 4 are checked exhaustively over
// all operand pairs, N = 32 over its corner values (0, 1, -1, the largest and
// the most negative number) crossed with each other and over random pairs.
// The reference is the simulator's own signed multiplication.  Each of the
// four sign cases (both operands non-negative, only b negative, only a
// negative, both negative) must occur for every instance.
module tb_robertson_mult;

  logic [7:0]  a8,  b8;   logic [15:0] mul8;
  logic [3:0]  a4,  b4;   logic [7:0]  mul4;
  logic [31:0] a32, b32;  logic [63:0] mul32;
  logic        clk = 1'b0;
  int unsigned cycles = 0;
  int          checks = 0, failures = 0;
  int          cases8 [4] = '{0, 0, 0, 0};
  int          cases4 [4] = '{0, 0, 0, 0};
  int          cases32 [4] = '{0, 0, 0, 0};

  robertson_mult                u_m8  (.a(a8),  .b(b8),  .mul(mul8));
  robertson_mult #(.N(4))       u_m4  (.a(a4),  .b(b4),  .mul(mul4));
  robertson_mult #(.N(32))      u_m32 (.a(a32), .b(b32), .mul(mul32));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 500000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", tag, got, exp_v);
    end
  endtask

  initial begin : stimulus
    logic [31:0] corner [5];
    corner = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000};
    a32 = '0; b32 = '0;
    // exhaustive 8 x 8 and 4 x 4
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        a4 = 4'(i); b4 = 4'(j);
        @(posedge clk);
        check("8x8", longint'($signed(mul8)), longint'($signed(a8)) * longint'($signed(b8)));
        cases8[{a8[7], b8[7]}]++;
        if (i < 16 && j < 16) begin
          check("4x4", longint'($signed(mul4)), longint'($signed(a4)) * longint'($signed(b4)));
          cases4[{a4[3], b4[3]}]++;
        end
      end
    end
    // 32 x 32: corners, then random
    for (int k = 0; k < 25 + 20000; k++) begin
      if (k < 25) begin
        a32 = corner[k / 5]; b32 = corner[k % 5];
      end else begin
        a32 = $urandom; b32 = $urandom;
        if (k % 7 == 0) a32 = a32 >> $urandom_range(0, 31);
        if (k % 11 == 0) b32 = b32 >> $urandom_range(0, 31);
      end
      @(posedge clk);
      check("32x32", longint'(mul32), longint'($signed(a32)) * longint'($signed(b32)));
      cases32[{a32[31], b32[31]}]++;
    end
    for (int c = 0; c < 4; c++) begin
      checks += 3;
      if (cases8[c] == 0)  begin failures++; $display("8x8 sign case %0d missed", c); end
      if (cases4[c] == 0)  begin failures++; $display("4x4 sign case %0d missed", c); end
      if (cases32[c] == 0) begin failures++; $display("32x32 sign case %0d missed", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
