// Reference model of one satellite for the testbenches.
//
// Watches the same inputs as a satellite (samples and register writes) and
// computes, clock by clock, what its DAC and test outputs should be after
// each clock edge. It keeps the history of every stage in arrays indexed by
// the edge number since reset and rebuilds each stage from its own
// definition: input delays, routing, 12-bit and 6-bit attenuators, the
// interference delay chain, the windowed Hilbert filter (coefficients
// recomputed from their formula), the Doppler rotation in real arithmetic
// with the accumulated NCO phase, and the clipped beam sum. The Doppler
// stage is approximated in real arithmetic, so each beam output carries a
// tolerance of 3 LSB; exp_*_tol gives the tolerance of each expected value.
// Register decoding follows the map in sat_pkg.
module sat_model
  import sat_pkg::*;
#(
  parameter int WS_DEPTH = 8192,
  parameter int IS_DEPTH = 8192,
  parameter int HS       = 131072   // history length, power of two
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NWS-1:0][DW-1:0] wsd,
  input  logic [DW-1:0]          is_in,
  input  logic                   strobe,
  input  logic [AW-1:0]          addr,
  input  logic [CW-1:0]          data,
  output int                     exp_dac,
  output int                     exp_dac_tol,
  output int                     exp_test,
  output int                     exp_test_tol,
  output int                     exp_beam [NBEAM]
);
  localparam real PI = 3.14159265358979;
  localparam int X0 = 0, WD = 3, BW = 6, ISA = 13, TS = 14, TA = 21, SR = 28, AA = 35, PP = 42, BO = 49, SU = 56, NARR = 57;

  int H [NARR][HS];
  int e;
  int hc [-15:15];
  // configuration
  int gain [NBEAM], fw [NBEAM], src [NBEAM], ws_d [NWS];
  int is_g, is_d, tsel, dsel;
  int ph_cur [NBEAM];

  function automatic int g(int id, int idx);
    return (idx < 0) ? 0 : H[id][idx & (HS - 1)];
  endfunction

  function automatic void p(int id, int idx, int v);
    H[id][idx & (HS - 1)] = v;
  endfunction

  function automatic int sat(longint v);
    return (v > 2047) ? 2047 : (v < -2048) ? -2048 : int'(v);
  endfunction

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int att(int x, int k, int kw);
    return int'((longint'(x) * k + (longint'(1) << (kw - 1))) >>> kw);
  endfunction

  initial begin
    for (int k = -15; k <= 15; k++)
      hc[k] = (k % 2 == 0) ? 0 : rnd(2048.0 * 2.0 / (PI * k) * (0.54 + 0.46 * $cos(2.0 * PI * k / 30.0)));
  end

  function automatic int node(int n, int ee);
    if (n == 0) return g(SU, ee);
    if (n >= 1 && n <= 7) return g(BO + n - 1, ee);
    if (n >= 8 && n <= 10) return g(WD + n - 8, ee);
    if (n == 11) return g(ISA, ee);
    return 0;
  endfunction

  function automatic int node_tol(int n);
    int c = 0;
    if (n == 0) begin
      for (int b = 0; b < NBEAM; b++) if (gain[b] != 0) c += 3;
      return c;
    end
    if (n >= 1 && n <= 7) return 3;
    return 0;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      e = 0;
      for (int b = 0; b < NBEAM; b++) begin gain[b] = 0; fw[b] = 0; src[b] = 0; ph_cur[b] = 0; end
      for (int n = 0; n < NWS; n++) ws_d[n] = 0;
      is_g = 0; is_d = 0; tsel = 0; dsel = 0;
      exp_dac = 0; exp_test = 0; exp_dac_tol = 0; exp_test_tol = 0;
      for (int b = 0; b < NBEAM; b++) exp_beam[b] = 0;
    end else begin
      // inputs and wanted-signal delays
      for (int n = 0; n < NWS; n++) begin
        p(X0 + n, e, int'($signed(wsd[n])));
        p(WD + n, e, g(X0 + n, e - (ws_d[n] % WS_DEPTH)));
      end
      // switching matrix
      for (int b = 0; b < NBEAM; b++)
        p(BW + b, e, (src[b] == 0) ? 0 : g(WD + src[b] - 1, e - 1));
      // interference attenuator and delay chain
      p(ISA, e, att(int'($signed(is_in)), is_g, 12));
      p(TS, e, g(ISA, e - 1));
      for (int b = 1; b < NBEAM; b++) begin
        p(TS + b, e, g(TA + b, e - 1));
        p(TA + b, e, g(TS + b - 1, e - (is_d % IS_DEPTH)));
      end
      // beams
      for (int b = 0; b < NBEAM; b++) begin
        longint q;
        real ph;
        int ii, qq;
        p(SR + b, e, sat(longint'(g(BW + b, e - 1)) + g(TS + b, e)));
        p(AA + b, e, att(g(SR + b, e - 1), gain[b], 6));
        p(PP + b, e, ph_cur[b]);   // NCO phase used at this edge
        ph_cur[b] = (ph_cur[b] + fw[b]) & 16'hFFFF;
        if (e < 15) begin
          p(BO + b, e, 0);
        end else begin
          ii = g(AA + b, e - 33);
          q = 0;
          for (int j = 0; j < 31; j++) q += longint'(hc[j - 15]) * g(AA + b, e - 18 - j);
          qq = sat((q + 1024) >>> 11);
          ph = 2.0 * PI * real'(g(PP + b, e - 15)) / 65536.0;
          p(BO + b, e, sat(longint'(rnd(real'(ii) * $cos(ph) - real'(qq) * $sin(ph)))));
        end
        exp_beam[b] = g(BO + b, e);
      end
      // combiner
      begin
        longint s;
        s = 0;
        for (int b = 0; b < NBEAM; b++) s += g(BO + b, e - 1);
        p(SU, e, sat(s));
      end
      exp_dac      = node(dsel, e - 1);
      exp_dac_tol  = node_tol(dsel);
      exp_test     = node(tsel, e - 1);
      exp_test_tol = node_tol(tsel);
      // register write takes effect after this edge
      if (strobe) begin
        int a, d;
        a = int'(addr);
        d = int'(data);
        if (a < 7)                   gain[a] = d & 63;
        else if (a >= 8 && a < 15)   fw[a - 8] = d & 16'hFFFF;
        else if (a >= 16 && a < 23)  src[a - 16] = d & 3;
        else if (a == 24)            is_g = d & 12'hFFF;
        else if (a == 25)            is_d = d & 13'h1FFF;
        else if (a >= 26 && a < 29)  ws_d[a - 26] = d & 13'h1FFF;
        else if (a == 29)            tsel = d & 15;
        else if (a == 30)            dsel = d & 15;
      end
      e++;
    end
  end
endmodule
