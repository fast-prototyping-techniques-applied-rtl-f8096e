// Workload testbench: the example setting of the original control program,
// loaded into the full-size simulator through the host port.
//
//   Satellite 1: beam 0 -0.14 dB (k=63), Doppler -15000 Hz (fw=-128), fed by
//                WSD1; beams 1..6 muted ("-inf"), Doppler -15000, -15000,
//                -15000, -15000, 820.31 and -468.7 Hz (fw -128.. 7, -4).
//   Satellite 2: gains -4.53, -0.28 x4, -6.02, -0.28 dB (k 38, 62, 32);
//                Doppler 234.37, -585.9, 1054.6, -585.9, -585.9, -468.7,
//                -585.9 Hz (fw 2, -5, 9, -5, -5, -4, -5); no input routed.
//   Satellite 3: gains -0.28 dB, Doppler -117.1 Hz (fw -1), beam 5 -820.3 Hz
//                (fw -7); no input routed.
//   Interference gains -25.08 / -0.56 / -0.56 dB, all switched to "-inf";
//   interference delay 2600 per satellite; WSD delays 0.
//
// With 117.1875 Hz per NCO step every listed value is an exact setting. The
// testbench compares all outputs every clock with sat_model, checks that
// satellites 2 and 3 stay silent, and checks independently that the output
// of satellite 1 is the WSD1 tone scaled by 63/64 and moved down by
// 128/65536 of the sample rate: the product of the output with the expected
// shifted tone (in phase and quadrature), averaged over 4096 samples, must
// have a magnitude close to half the output amplitude.
module tb_example_configuration;
  import sat_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real F0 = 0.15;            // WSD1 tone, cycles per sample
  localparam real A  = 1000.0;
  logic clk = 0, rst_n = 0;
  logic [NWS-1:0][DW-1:0]  wsd;
  logic [NSAT-1:0][DW-1:0] is_in;
  logic host_wr;
  logic [AW+1:0] host_addr;
  logic [CW-1:0] host_data;
  logic [15:0] host_wr_count;
  logic [NSAT-1:0][DW-1:0] dac_data, test_data;
  logic [NSAT-1:0] dac_clk, test_clk, sum_clipped;
  logic [NSAT-1:0] m_strobe;
  logic [AW-1:0]   m_addr;
  logic [CW-1:0]   m_data;
  int exp_dac [NSAT], exp_dac_tol [NSAT], exp_test [NSAT], exp_test_tol [NSAT];
  int exp_beam [NSAT][NBEAM];
  int checks = 0, failures = 0, t = 0;

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absi(int v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic tick(bit wr, int sel, int a, int d);
    wsd[0] = DW'(int'(A * $cos(2.0 * PI * F0 * t)));
    wsd[1] = DW'($signed(12'($urandom)) >>> 2);
    wsd[2] = DW'($signed(12'($urandom)) >>> 2);
    for (int s = 0; s < NSAT; s++) is_in[s] = DW'($urandom);
    host_wr = wr; host_addr = {2'(sel), 8'(a)}; host_data = CW'(d);
    @(posedge clk); #1;
    t++;
    for (int s = 0; s < NSAT; s++) begin
      checks++;
      if (absi(int'($signed(dac_data[s])) - exp_dac[s]) > exp_dac_tol[s]) begin
        failures++; if (failures < 12) $display("t=%0d sat%0d dac %0d exp %0d", t, s, $signed(dac_data[s]), exp_dac[s]);
      end
    end
  endtask

  task automatic wr(int sel, int a, int d);
    tick(1, sel, a, d);
  endtask

  initial begin
    int g1 [7] = '{63, 0, 0, 0, 0, 0, 0};
    int f1 [7] = '{-128, -128, -128, -128, -128, 7, -4};
    int g2 [7] = '{38, 62, 62, 62, 62, 32, 62};
    int f2 [7] = '{2, -5, 9, -5, -5, -4, -5};
    int f3 [7] = '{-1, -1, -1, -1, -1, -7, -1};
    real corr, corr_q, ph;
    int silent;
    wsd = '0; is_in = '0; host_wr = 0; host_addr = '0; host_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < NBEAM; b++) begin
      wr(0, A_BEAM_GAIN + b, g1[b]); wr(0, A_BEAM_FW + b, f1[b]);
      wr(1, A_BEAM_GAIN + b, g2[b]); wr(1, A_BEAM_FW + b, f2[b]);
      wr(2, A_BEAM_GAIN + b, 62);    wr(2, A_BEAM_FW + b, f3[b]);
    end
    wr(3, A_IS_GAIN, 0);                      // "-inf" on all interference inputs
    wr(3, A_IS_DELAY, 2600);
    wr(0, A_BEAM_SRC + 0, 1);                 // WS1 -> satellite 1, beam 0
    repeat (200) tick(0, 0, 0, 0);
    corr = 0.0; corr_q = 0.0; silent = 0;
    for (int i = 0; i < 4096; i++) begin
      tick(0, 0, 0, 0);
      // expected frequency F0 - 128/65536; the phase offset is unknown, so
      // correlate with cosine and sine and take the magnitude
      ph = 2.0 * PI * (F0 - 128.0 / 65536.0) * t;
      corr += real'($signed(dac_data[0])) * $cos(ph);
      corr_q += real'($signed(dac_data[0])) * $sin(ph);
      if (dac_data[1] == 0 && dac_data[2] == 0) silent++;
    end
    corr = $sqrt(corr * corr + corr_q * corr_q) / 4096.0;
    checks++;
    if (silent != 4096) begin failures++; $display("satellites 2 and 3 not silent: %0d of 4096", silent); end
    $display("correlation with the shifted tone %f, expected about %f", corr, 0.5 * A * 63.0 / 64.0);
    checks++;
    if (corr < 0.45 * A * 63.0 / 64.0 || corr > 0.55 * A * 63.0 / 64.0) begin failures++; $display("satellite 1 output is not the shifted tone"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
