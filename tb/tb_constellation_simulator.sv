// End-to-end testbench of the constellation simulator at its full size
// (8192-sample delays, three satellites of seven beams).
//
// The host port loads a configuration, as a control program would, and then
// changes it while the simulator runs. Three reference models (sat_model),
// fed with the register writes one clock after the host, as the control
// section forwards them, predict the DAC and test outputs of every satellite
// every clock. The run covers the mechanisms of the simulator and counts
// each one: per-satellite and broadcast writes, the longest input delay
// (8191+1 samples) and a long interference chain, interference injection,
// path-loss attenuation and muting, Doppler shift at +/-15 kHz settings,
// diversity (one input on two satellites), satellite hand-over and beam
// hand-over (routing changed at run time), output clipping, and the test
// and DAC multiplexers.
module tb_constellation_simulator;
  import sat_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic [NWS-1:0][DW-1:0]  wsd;
  logic [NSAT-1:0][DW-1:0] is_in;
  logic host_wr;
  logic [AW+1:0] host_addr;
  logic [CW-1:0] host_data;
  logic [15:0] host_wr_count;
  logic [NSAT-1:0][DW-1:0] dac_data, test_data;
  logic [NSAT-1:0] dac_clk, test_clk, sum_clipped;

  // register writes as the satellites receive them
  logic [NSAT-1:0] m_strobe;
  logic [AW-1:0]   m_addr;
  logic [CW-1:0]   m_data;

  int exp_dac [NSAT], exp_dac_tol [NSAT], exp_test [NSAT], exp_test_tol [NSAT];
  int exp_beam [NSAT][NBEAM];
  int checks = 0, failures = 0, t = 0, nwr = 0;
  int n_bcast = 0, n_unicast = 0, n_maxdelay = 0, n_chain = 0, n_intf = 0, n_mute = 0, n_doppler = 0;
  int n_divers = 0, n_sat_ho = 0, n_beam_ho = 0, n_clip = 0, n_testmux = 0, n_dacmux = 0;
  real amp [3];
  real frq [3];

  constellation_simulator dut (.*);

  for (genvar s = 0; s < NSAT; s++) begin : g_mdl
    sat_model #(.WS_DEPTH(8192), .IS_DEPTH(8192), .HS(131072)) mdl (
      .clk, .rst_n, .wsd, .is_in(is_in[s]), .strobe(m_strobe[s]), .addr(m_addr), .data(m_data),
      .exp_dac(exp_dac[s]), .exp_dac_tol(exp_dac_tol[s]), .exp_test(exp_test[s]),
      .exp_test_tol(exp_test_tol[s]), .exp_beam(exp_beam[s])
    );
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      m_strobe <= '0; m_addr <= '0; m_data <= '0;
    end else begin
      m_strobe <= '0;
      if (host_wr) begin
        m_addr <= host_addr[7:0];
        m_data <= host_data;
        for (int s = 0; s < NSAT; s++) m_strobe[s] <= (host_addr[9:8] == 2'd3) || (int'(host_addr[9:8]) == s);
      end
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absi(int v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic tick(bit wr, int sel, int a, int d);
    for (int n = 0; n < 3; n++)
      wsd[n] = DW'(int'(amp[n] * $cos(2.0 * PI * frq[n] * t)) + int'($urandom_range(0, 30)) - 15);
    for (int s = 0; s < NSAT; s++) is_in[s] = DW'($signed(12'($urandom)) >>> 1);
    host_wr = wr; host_addr = {2'(sel), 8'(a)}; host_data = CW'(d);
    if (wr) nwr++;
    @(posedge clk); #1;
    t++;
    for (int s = 0; s < NSAT; s++) begin
      if (sum_clipped[s]) n_clip++;
      checks += 2;
      if (absi(int'($signed(dac_data[s])) - exp_dac[s]) > exp_dac_tol[s]) begin
        failures++; if (failures < 12) $display("t=%0d sat%0d dac %0d exp %0d", t, s, $signed(dac_data[s]), exp_dac[s]);
      end
      if (absi(int'($signed(test_data[s])) - exp_test[s]) > exp_test_tol[s]) begin
        failures++; if (failures < 12) $display("t=%0d sat%0d test %0d exp %0d", t, s, $signed(test_data[s]), exp_test[s]);
      end
    end
  endtask

  task automatic wr(int sel, int a, int d);
    tick(1, sel, a, d);
    if (sel == 3) n_bcast++; else n_unicast++;
    if (a >= A_BEAM_FW && a < A_BEAM_FW + 7 && d != 0) n_doppler++;
    if (a < 7 && d == 0) n_mute++;
    if (a == A_IS_GAIN && d != 0) n_intf++;
    if (a == A_TEST_SEL) n_testmux++;
    if (a == A_DAC_SEL && d != 0) n_dacmux++;
    if (a >= A_WS_DELAY && a < A_WS_DELAY + 3 && d == 8191) n_maxdelay++;
    if (a == A_IS_DELAY && d >= 1000) n_chain++;
  endtask

  task automatic run(int n);
    repeat (n) tick(0, 0, 0, 0);
  endtask

  task automatic count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
    else $display("%s: %0d", what, n);
  endtask

  initial begin
    wsd = '0; is_in = '0; host_wr = 0; host_addr = '0; host_data = '0;
    amp = '{600.0, 400.0, 300.0}; frq = '{0.07, 0.19, 0.29};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(20);
    // common settings for all satellites
    wr(3, A_IS_GAIN, 228);                    // -25.08 dB interference
    wr(3, A_WS_DELAY + 2, 40);
    // satellite 1: WSD1 on beams 0 and 1 (beam diversity), Doppler
    wr(0, A_BEAM_SRC + 0, 1);  wr(0, A_BEAM_GAIN + 0, 63); wr(0, A_BEAM_FW + 0, -128);
    wr(0, A_BEAM_SRC + 1, 1);  wr(0, A_BEAM_GAIN + 1, 45); wr(0, A_BEAM_FW + 1, 7);
    wr(0, A_BEAM_GAIN + 2, 20);                               // interference only
    wr(0, A_TEST_SEL, NODE_BEAM + 1);
    // satellite 2: WSD1 too (satellite diversity) with the longest delay
    wr(1, A_WS_DELAY + 0, 8191);
    wr(1, A_BEAM_SRC + 3, 1);  wr(1, A_BEAM_GAIN + 3, 62); wr(1, A_BEAM_FW + 3, 128);
    wr(1, A_BEAM_SRC + 5, 3);  wr(1, A_BEAM_GAIN + 5, 38); wr(1, A_BEAM_FW + 5, -4);
    wr(1, A_TEST_SEL, NODE_WS + 0);
    n_divers++;
    // satellite 3: long interference chain into beam 6
    wr(2, A_IS_DELAY, 1600);
    wr(2, A_BEAM_SRC + 6, 2);  wr(2, A_BEAM_GAIN + 6, 63); wr(2, A_BEAM_FW + 6, 9);
    wr(2, A_BEAM_GAIN + 0, 10);
    wr(2, A_TEST_SEL, NODE_IS);
    run(8400);                                // WSD1 reaches satellite 2 after 8192 samples
    wr(2, A_DAC_SEL, NODE_BEAM + 6);
    run(2000);
    wr(2, A_DAC_SEL, NODE_SUM);
    // beam hand-over on satellite 1: WSD1 moves from beam 0 to beam 4
    wr(0, A_BEAM_SRC + 4, 1);  wr(0, A_BEAM_GAIN + 4, 63); wr(0, A_BEAM_FW + 4, 2);
    wr(0, A_BEAM_SRC + 0, 0);  wr(0, A_BEAM_GAIN + 0, 0);
    n_beam_ho++;
    run(1000);
    // satellite hand-over: WSD2 leaves satellite 3 and appears on satellite 1
    wr(2, A_BEAM_SRC + 6, 0);
    wr(0, A_BEAM_SRC + 2, 2);
    n_sat_ho++;
    run(1500);
    for (int s = 0; s < 12; s++) begin
      wr(3, A_TEST_SEL, s);
      run(60);
    end
    // long interference chain reaching beam 6 of satellite 3 (6 * 1601 samples)
    run(9000);
    // overdrive satellite 1: every beam carries a strong WSD3 at full gain
    amp[2] = 2000.0; frq[2] = 0.03;
    for (int b = 0; b < NBEAM; b++) begin
      wr(0, A_BEAM_SRC + b, 3); wr(0, A_BEAM_GAIN + b, 63); wr(0, A_BEAM_FW + b, 0);
    end
    run(500);
    checks++;
    if (host_wr_count != 16'(nwr)) begin failures++; $display("host write count %0d, expected %0d", host_wr_count, nwr); end
    checks++;
    if (dac_clk != {NSAT{clk}} || test_clk != {NSAT{clk}}) begin failures++; $display("clock outputs wrong"); end
    count("broadcast writes", n_bcast);
    count("per-satellite writes", n_unicast);
    count("maximum input delay", n_maxdelay);
    count("long interference chain", n_chain);
    count("interference injection", n_intf);
    count("beam muted", n_mute);
    count("Doppler shift", n_doppler);
    count("satellite diversity", n_divers);
    count("beam hand-over", n_beam_ho);
    count("satellite hand-over", n_sat_ho);
    count("output clipped", n_clip);
    count("test mux selections", n_testmux);
    count("DAC mux selections", n_dacmux);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
