// Testbench for doppler_nco. Inputs are complex tones and random complex
// samples; for the sample entering at clock k the expected output, 16
// clocks later, is Re{(i + j*q) * exp(j*2*pi*P(k)/2^16)}, P(k) = sum of the
// frequency words of the clocks before k. It is computed here with real
// arithmetic and compared within 3 LSB. Frequency words cover 0, small and
// the +/-15 kHz settings (+/-128 at 117.1875 Hz per step), large values
// and a change at run time. The latency of 16 clocks is checked on a step.
module tb_doppler_nco;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] fw;
  logic signed [11:0] i_in, q_in, dout;
  int checks = 0, failures = 0, maxerr = 0;
  real expv [65536];
  int t;
  longint phase;

  doppler_nco #(.DW(12), .PW(16), .ITER(14)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clip(real v);
    return (v > 2047.0) ? 2047.0 : (v < -2048.0) ? -2048.0 : v;
  endfunction

  task automatic step(int i, int q, int f, bit chk);
    real ph, err;
    fw = 16'(f); i_in = 12'(i); q_in = 12'(q);
    ph = 2.0 * PI * real'(phase % 65536) / 65536.0;
    expv[t] = clip(real'(i) * $cos(ph) - real'(q) * $sin(ph));
    phase = (phase + longint'(f) + 65536) % 65536;
    @(posedge clk); #1;
    if (chk && t >= 15) begin
      err = real'(dout) - expv[t - 15];
      if (err < 0) err = -err;
      checks++;
      if (int'(err) > maxerr) maxerr = int'(err);
      if (err > 3.0) begin failures++; if (failures < 10) $display("t=%0d got %0d exp %f", t, dout, expv[t-15]); end
    end
    t++;
  endtask

  initial begin
    int first;
    real w;
    fw = 0; i_in = 0; q_in = 0; t = 0; phase = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // latency: zero input, then a step
    for (int k = 0; k < 20; k++) step(0, 0, 0, 1);
    first = -1;
    for (int k = 0; k < 30; k++) begin
      step(1000, 0, 0, 1);
      if (first < 0 && dout != 0) first = k + 1;
    end
    checks++;
    if (first != 16) begin failures++; $display("latency %0d, expected 16", first); end
    // tones and random samples at several Doppler settings
    for (int s = 0; s < 8; s++) begin
      int f;
      case (s)
        0: f = 0; 1: f = 1; 2: f = -1; 3: f = 128; 4: f = -128;
        5: f = 7; 6: f = 16384; default: f = -30001;
      endcase
      w = 2.0 * PI * 0.05 * (s + 1);
      for (int k = 0; k < 1500; k++) begin
        if (k % 3 == 0) step(int'($signed(11'($urandom))), int'($signed(11'($urandom))), f, 1);
        else step(int'(1400.0 * $cos(w * k)), int'(1400.0 * $sin(w * k)), f, 1);
      end
    end
    $display("max error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
