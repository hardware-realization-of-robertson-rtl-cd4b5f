// tb_robertson_add_shift: self-checking test of one add-and-shift pass.
//
// Drives robertson_add_shift (N = 8) with every multiplicand a against random
// working registers whose partial product lies in the range a real multiply
// can reach, and compares m_out with a reference computed as plain integer
// arithmetic: the register read as the number P * 2^N + low, with a * 2^N
// added when the low bit is 1, then halved rounding towards minus infinity.
// Counts how often the add and the shift-only branches, and a negative result
// (leading 1s shifted in), occurred; a branch that never occurs is a failure.
module tb_robertson_add_shift;

  localparam int unsigned N = 8;

  logic [N-1:0] a;
  logic [2*N:0] m_in, m_out;
  logic         clk = 1'b0;
  int unsigned  cycles = 0;
  int           checks = 0, failures = 0;
  int           n_add = 0, n_skip = 0, n_neg = 0;

  robertson_add_shift dut (.a(a), .m_in(m_in), .m_out(m_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_step(longint av, longint p, longint low);
    longint v;
    v = p * (longint'(1) << N) + low;
    if (low[0]) v += av * (longint'(1) << N);
    return v >>> 1;
  endfunction

  initial begin : stimulus
    longint p, low, av, exp_v, got_v;
    for (int ai = 0; ai < (1 << N); ai++) begin
      for (int r = 0; r < 64; r++) begin
        a   = N'(ai);
        p   = longint'($urandom_range(0, (1 << N) - 1)) - (1 << (N - 1));
        low = longint'($urandom_range(0, (1 << N) - 1));
        if (r == 0) p = -(1 << (N - 1));
        if (r == 1) p = (1 << (N - 1)) - 1;
        m_in = {p[N:0], low[N-1:0]};
        @(posedge clk);
        av    = longint'($signed(a));
        exp_v = ref_step(av, p, low);
        got_v = longint'($signed(m_out));
        checks++;
        if (got_v != exp_v) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d P=%0d low=%h: got %0d expected %0d", av, p, low, got_v, exp_v);
        end
        if (low[0]) n_add++; else n_skip++;
        if (m_out[2*N]) n_neg++;
      end
    end
    checks += 3;
    if (n_add == 0)  begin failures++; $display("add branch never taken"); end
    if (n_skip == 0) begin failures++; $display("shift-only branch never taken"); end
    if (n_neg == 0)  begin failures++; $display("negative partial product never seen"); end
    $display("add=%0d shift_only=%0d negative=%0d", n_add, n_skip, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
