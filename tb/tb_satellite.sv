// Testbench for one satellite, with the wanted-signal delay RAM reduced to
// 256 words and the interference delay elements to 64 words to keep the run
// short. Inputs are tones plus noise; the configuration is rewritten at run
// time through the register port. Every clock the DAC and test outputs are
// compared with sat_model within its tolerance. The run makes each
// mechanism happen and counts it: input delay, routing of one input to
// several beams, an unrouted beam, interference injection through the delay
// chain, beam muting, Doppler shift at +/-15 kHz settings, output clipping,
// test and DAC multiplexer selections, and run-time reconfiguration.
module tb_satellite;
  import sat_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic [NWS-1:0][DW-1:0] wsd;
  logic [DW-1:0] is_in;
  logic strobe;
  logic [AW-1:0] addr;
  logic [CW-1:0] data;
  logic [DW-1:0] dac_data, test_data;
  logic dac_clk, test_clk, sum_clipped;
  int exp_dac, exp_dac_tol, exp_test, exp_test_tol;
  int exp_beam [NBEAM];
  int checks = 0, failures = 0, t = 0;
  int n_clip = 0, n_reconf = 0, n_doppler = 0, n_delay = 0, n_intf = 0, n_mute = 0, n_multi = 0, n_none = 0, n_testsel = 0, n_dacsel = 0;
  real amp [3];
  real frq [3];

  satellite #(.WS_DEPTH(256), .IS_DEPTH(64)) dut (
    .clk, .rst_n, .wsd, .is_in(is_in), .strobe, .addr, .data,
    .dac_data, .dac_clk, .test_clk, .test_data, .sum_clipped
  );

  sat_model #(.WS_DEPTH(256), .IS_DEPTH(64), .HS(4096)) mdl (
    .clk, .rst_n, .wsd, .is_in, .strobe, .addr, .data,
    .exp_dac, .exp_dac_tol, .exp_test, .exp_test_tol, .exp_beam
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absi(int v);
    return (v < 0) ? -v : v;
  endfunction

  // one clock: new input samples, optional register write, compare outputs
  task automatic tick(bit wr, int a, int d);
    for (int n = 0; n < 3; n++)
      wsd[n] = DW'(int'(amp[n] * $cos(2.0 * PI * frq[n] * t)) + int'($urandom_range(0, 40)) - 20);
    is_in  = DW'($signed(12'($urandom)) >>> 1);
    strobe = wr; addr = AW'(a); data = CW'(d);
    @(posedge clk); #1;
    t++;
    if (sum_clipped) n_clip++;
    checks += 2;
    if (absi(int'($signed(dac_data)) - exp_dac) > exp_dac_tol) begin
      failures++; if (failures < 12) $display("t=%0d dac %0d exp %0d (+-%0d)", t, $signed(dac_data), exp_dac, exp_dac_tol);
    end
    if (absi(int'($signed(test_data)) - exp_test) > exp_test_tol) begin
      failures++; if (failures < 12) $display("t=%0d test %0d exp %0d (+-%0d)", t, $signed(test_data), exp_test, exp_test_tol);
    end
  endtask

  task automatic wr(int a, int d);
    tick(1, a, d);
    n_reconf++;
    if (a >= A_BEAM_FW && a < A_BEAM_FW + 7 && d != 0) n_doppler++;
    if (a >= A_WS_DELAY && a < A_WS_DELAY + 3 && d != 0) n_delay++;
    if (a == A_IS_GAIN && d != 0) n_intf++;
    if (a < 7 && d == 0) n_mute++;
    if (a >= A_BEAM_SRC && a < A_BEAM_SRC + 7 && d == 0) n_none++;
    if (a == A_TEST_SEL) n_testsel++;
    if (a == A_DAC_SEL && d != 0) n_dacsel++;
  endtask

  task automatic run(int n);
    repeat (n) tick(0, 0, 0);
  endtask

  task automatic count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
    else $display("%s: %0d", what, n);
  endtask

  initial begin
    wsd = '0; is_in = '0; strobe = 0; addr = '0; data = '0;
    amp = '{700.0, 500.0, 300.0}; frq = '{0.11, 0.23, 0.31};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(50);                                 // all muted after reset
    // single path: WSD1 -> beam 0, no Doppler, observe beam 0 on the test port
    wr(A_BEAM_SRC + 0, 1);
    wr(A_BEAM_GAIN + 0, 63);
    wr(A_TEST_SEL, NODE_BEAM + 0);
    run(200);
    // delay and Doppler on the same path
    wr(A_WS_DELAY + 0, 100);
    wr(A_BEAM_FW + 0, 128);                  // +15 kHz at 117.1875 Hz per step
    run(400);
    // full configuration: all beams, interference through the chain
    wr(A_WS_DELAY + 1, 255);
    wr(A_WS_DELAY + 2, 0);
    wr(A_IS_GAIN, 228);                      // -25.08 dB
    wr(A_IS_DELAY, 5);
    for (int b = 0; b < NBEAM; b++) begin
      wr(A_BEAM_SRC + b, (b == 6) ? 0 : 1 + (b % 3));
      wr(A_BEAM_GAIN + b, 16 + 6 * b);
      wr(A_BEAM_FW + b, (b % 2) ? -128 : 9 * b);
    end
    n_multi++;                               // WSD1 feeds beams 0 and 3, WSD2 beams 1 and 4
    for (int s = 0; s < 12; s++) begin
      wr(A_TEST_SEL, s);
      run(150);
    end
    wr(A_DAC_SEL, NODE_WS + 1);
    run(300);
    wr(A_DAC_SEL, NODE_IS);
    run(100);
    wr(A_DAC_SEL, NODE_SUM);
    // mute a beam, change the interference delay at run time
    wr(A_BEAM_GAIN + 2, 0);
    wr(A_IS_DELAY, 63);
    run(700);
    // overdrive: strong inputs on every beam at full gain -> clipping
    amp = '{2000.0, 2000.0, 2000.0}; frq = '{0.02, 0.02, 0.02};
    for (int b = 0; b < NBEAM; b++) begin
      wr(A_BEAM_SRC + b, 1);
      wr(A_BEAM_GAIN + b, 63);
      wr(A_BEAM_FW + b, 0);
    end
    wr(A_WS_DELAY + 0, 0);
    run(400);
    count("input delay", n_delay);
    count("one input on several beams", n_multi);
    count("unrouted beam", n_none);
    count("interference injection", n_intf);
    count("beam muted", n_mute);
    count("Doppler shift", n_doppler);
    count("output clipped", n_clip);
    count("test mux selections", n_testsel);
    count("DAC mux selections", n_dacsel);
    count("run-time writes", n_reconf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
