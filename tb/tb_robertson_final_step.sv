// tb_robertson_final_step: self-checking test of the correcting last pass.
//
// Drives robertson_final_step (N = 8) with every multiplicand a, both values
// of the multiplier sign bit and random working registers, and compares mul
// with an integer reference: the register read as P * 2^N + low, plus a * 2^N
// when low bit and sign bit are 1 and 0, minus a * 2^N when both are 1, halved
// and cut to 2N bits.  Each of the four branches must occur.
module tb_robertson_final_step;

  localparam int unsigned N = 8;

  logic [N-1:0]   a;
  logic           b_msb;
  logic [2*N:0]   m_in;
  logic [2*N-1:0] mul;
  logic           clk = 1'b0;
  int unsigned    cycles = 0;
  int             checks = 0, failures = 0;
  int             n_branch [4] = '{0, 0, 0, 0};

  robertson_final_step dut (.a(a), .b_msb(b_msb), .m_in(m_in), .mul(mul));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    longint p, low, av, v;
    logic [2*N-1:0] exp_mul;
    for (int ai = 0; ai < (1 << N); ai++) begin
      for (int r = 0; r < 64; r++) begin
        a     = N'(ai);
        b_msb = r[0];
        p     = longint'($urandom_range(0, (1 << N) - 1)) - (1 << (N - 1));
        low   = longint'($urandom_range(0, (1 << N) - 1));
        if (r < 4) low[0] = r[1];
        m_in  = {p[N:0], low[N-1:0]};
        @(posedge clk);
        av = longint'($signed(a));
        v  = p * (longint'(1) << N) + low;
        if (low[0] && !b_msb) v += av * (longint'(1) << N);
        if (low[0] &&  b_msb) v -= av * (longint'(1) << N);
        v = v >>> 1;
        exp_mul = v[2*N-1:0];
        checks++;
        if (mul !== exp_mul) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d P=%0d low=%h sign=%0b: got %h expected %h",
                     av, p, low, b_msb, mul, exp_mul);
        end
        n_branch[{b_msb, low[0]}]++;
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_branch[k] == 0) begin
        failures++;
        $display("branch sign=%0d m0=%0d never taken", k >> 1, k & 1);
      end
    end
    $display("branches: shift=%0d add=%0d shift_neg=%0d subtract=%0d",
             n_branch[0], n_branch[1], n_branch[2], n_branch[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
