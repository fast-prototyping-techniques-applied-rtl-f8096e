// Testbench for hilbert_r2c.
// 1. Random input: I must be the input after 17 register stages and Q the FIR sum
//    with coefficients recomputed here from the windowed 2/(pi*n) formula.
// 2. A cosine at fs/8 must come out as a sine of the same amplitude in Q
//    (Hilbert transform), within the filter's passband ripple.
// 3. An impulse must first reach I on the 16th clock edge after the one that took it in (17 stages).
module tb_hilbert_r2c;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] din, i_out, q_out;
  int checks = 0, failures = 0;
  int hist [8192];
  int h [-15:15];
  int t;

  hilbert_r2c #(.DW(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int sat(longint v);
    return (v > 2047) ? 2047 : (v < -2048) ? -2048 : int'(v);
  endfunction

  function automatic int x_at(int i);
    return (i < 0) ? 0 : hist[i];
  endfunction

  // After clock t: i_out = x(t-16), q_out = sum_k h[k] x(t-16-k)
  task automatic step(int x, bit chk_exact);
    longint acc;
    din = 12'(x);
    hist[t] = x;
    @(posedge clk); #1;
    if (chk_exact) begin
      acc = 0;
      for (int k = -15; k <= 15; k++) acc += longint'(h[k]) * x_at(t - 16 - k);
      checks += 2;
      if (int'(i_out) != x_at(t - 16)) begin failures++; if (failures < 10) $display("t=%0d I %0d exp %0d", t, i_out, x_at(t-16)); end
      if (int'(q_out) != sat((acc + 1024) >>> 11)) begin failures++; if (failures < 10) $display("t=%0d Q %0d exp %0d", t, q_out, sat((acc + 1024) >>> 11)); end
    end
    t++;
  endtask

  initial begin
    int first;
    real ex;
    for (int k = -15; k <= 15; k++)
      h[k] = (k % 2 == 0) ? 0 : rnd(2048.0 * 2.0 / (PI * k) * (0.54 + 0.46 * $cos(2.0 * PI * k / 30.0)));
    din = 0; t = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // impulse latency
    step(1000, 0);
    first = -1;
    for (int i = 1; i < 40; i++) begin
      step(0, 0);
      if (first < 0 && i_out != 0) first = i;   // clocks after the impulse's clock
    end
    checks++;
    if (first != 16) begin failures++; $display("latency %0d, expected 16", first); end
    // random samples, exact
    for (int i = 0; i < 3000; i++) step(int'($signed(12'($urandom))), 1);
    // cosine at fs/8 -> sine
    for (int i = 0; i < 400; i++) begin
      step(rnd(1500.0 * $cos(2.0 * PI * (t) / 8.0)), 1);
      if (i > 60) begin
        ex = 1500.0 * $sin(2.0 * PI * (t - 1 - 16) / 8.0);
        checks++;
        if (real'(q_out) - ex > 40.0 || ex - real'(q_out) > 40.0) begin
          failures++; if (failures < 10) $display("sine: Q %0d expected about %f", q_out, ex);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
