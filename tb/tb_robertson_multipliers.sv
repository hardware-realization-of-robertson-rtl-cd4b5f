// tb_robertson_multipliers: end-to-end test of the six multipliers side by side.
//
// Instantiates robertson_multipliers exactly as it is, with no parameter
// overrides, so every width runs at its real size.  Each round applies fresh
// operands to all six multipliers at once and compares every product with the
// simulator's signed multiplication.  Operands come from the corner values
// 0, 1, -1, the largest and the most negative number of each width (crossed
// with each other), then from random numbers, some of them shortened so that
// small magnitudes also occur.  For every width it counts the four sign cases
// of the method: (i) both operands non-negative, (ii) negative multiplier b
// only, which ends in the subtracting correction pass, (iii) negative
// multiplicand a only, where leading 1s enter once a is first added, and
// (iv) both negative.  A case that never occurs counts as a failure.  The
// products are combinational, so each is checked in the same cycle its
// operands are applied.
module tb_robertson_multipliers;

  localparam int NW = 6;
  localparam int W [NW] = '{4, 6, 8, 12, 16, 32};
  localparam int ROUNDS = 40000;

  logic [3:0]  a4,  b4;   logic [7:0]  mul4;
  logic [5:0]  a6,  b6;   logic [11:0] mul6;
  logic [7:0]  a8,  b8;   logic [15:0] mul8;
  logic [11:0] a12, b12;  logic [23:0] mul12;
  logic [15:0] a16, b16;  logic [31:0] mul16;
  logic [31:0] a32, b32;  logic [63:0] mul32;

  logic        clk = 1'b0;
  int unsigned cycles = 0;
  int          checks = 0, failures = 0;
  int          n_case [NW][4];

  robertson_multipliers dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10 * ROUNDS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sign-extend the low w bits of x
  function automatic longint sext(longint x, int w);
    return (x <<< (64 - w)) >>> (64 - w);
  endfunction

  // corner value k (0..4) of a w-bit two's complement number, as raw bits
  function automatic longint corner(int k, int w);
    case (k)
      0: return 0;
      1: return 1;
      2: return (longint'(1) << w) - 1;
      3: return (longint'(1) << (w - 1)) - 1;
      default: return longint'(1) << (w - 1);
    endcase
  endfunction

  function automatic longint rand_bits(int w, int rnd);
    longint v;
    v = {$urandom, $urandom};
    if (rnd % 5 == 0) v = v >> $urandom_range(0, 63);
    if (rnd % 9 == 0) v = ~(v >> $urandom_range(0, 63));
    return (w == 64) ? v : v & ((longint'(1) << w) - 1);
  endfunction

  task automatic check(int idx, longint av, longint bv, longint got);
    longint sa, sb, exp_v, mask;
    sa    = sext(av, W[idx]);
    sb    = sext(bv, W[idx]);
    exp_v = sa * sb;
    mask  = (2 * W[idx] == 64) ? -1 : (longint'(1) << (2 * W[idx])) - 1;
    checks++;
    if ((got & mask) != (exp_v & mask)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0dx%0d: %0d * %0d gave %0d", W[idx], W[idx], sa, sb, sext(got, 2 * W[idx]));
    end
    n_case[idx][{sa < 0, sb < 0}]++;
  endtask

  initial begin : stimulus
    longint av [NW], bv [NW];
    for (int i = 0; i < NW; i++) for (int c = 0; c < 4; c++) n_case[i][c] = 0;
    for (int r = 0; r < 25 + ROUNDS; r++) begin
      for (int i = 0; i < NW; i++) begin
        if (r < 25) begin
          av[i] = corner(r / 5, W[i]);
          bv[i] = corner(r % 5, W[i]);
        end else begin
          av[i] = rand_bits(W[i], r);
          bv[i] = rand_bits(W[i], r + 2);
        end
      end
      a4  = av[0][3:0];  b4  = bv[0][3:0];
      a6  = av[1][5:0];  b6  = bv[1][5:0];
      a8  = av[2][7:0];  b8  = bv[2][7:0];
      a12 = av[3][11:0]; b12 = bv[3][11:0];
      a16 = av[4][15:0]; b16 = bv[4][15:0];
      a32 = av[5][31:0]; b32 = bv[5][31:0];
      @(posedge clk);
      check(0, av[0], bv[0], longint'(mul4));
      check(1, av[1], bv[1], longint'(mul6));
      check(2, av[2], bv[2], longint'(mul8));
      check(3, av[3], bv[3], longint'(mul12));
      check(4, av[4], bv[4], longint'(mul16));
      check(5, av[5], bv[5], longint'(mul32));
    end
    for (int i = 0; i < NW; i++) begin
      $display("%0dx%0d: case i=%0d ii=%0d iii=%0d iv=%0d", W[i], W[i],
               n_case[i][0], n_case[i][1], n_case[i][2], n_case[i][3]);
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (n_case[i][c] == 0) begin
          failures++;
          $display("%0dx%0d: sign case %0d never exercised", W[i], W[i], c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
