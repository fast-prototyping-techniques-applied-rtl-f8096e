// One satellite of the constellation simulator (one FPGA).
//
// Dataflow, one 12-bit sample per clock:
//   WSD1..WSD3 -> programmable delay (1..8192 samples each) -> switching
//   matrix -> seven beams.
//   IS -> 72 dB attenuator -> six-element delay chain -> one tap per beam.
//   Each beam: add wanted + interference, 36 dB attenuator, R to C, Doppler
//   NCO, C to R (beam_channel).
//   Seven beams -> saturating combiner -> DAC multiplexer -> dac_data.
// A test multiplexer puts any of 16 internal nodes on the test connector;
// the DAC multiplexer can show the same nodes instead of the satellite
// output. All settings come from the satellite's control logic, written over
// strobe/addr/data. The block structure follows the satellite block diagram;
// putting the wanted-signal delay in front of the switching matrix, the node
// lists of the two multiplexers and forwarding the global clock as the DAC
// and test clocks are this design's choices.
//
// Timing: a wanted sample reaches dac_data after
//   (ws_delay+1) + 1 (matrix) + 35 (beam) + 1 (combiner) + 1 (DAC mux)
// clocks. The interference reaches beam b after 1 (attenuator) +
// b*(is_delay+1) clocks, then the same 38 clocks.
module satellite
  import sat_pkg::*;
#(
  parameter int WS_DEPTH = 8192,
  parameter int IS_DEPTH = 8192
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NWS-1:0][DW-1:0] wsd,
  input  logic signed [DW-1:0]  is_in,
  input  logic                  strobe,
  input  logic [AW-1:0]         addr,
  input  logic [CW-1:0]         data,
  output logic [DW-1:0]         dac_data,
  output logic                  dac_clk,
  output logic                  test_clk,
  output logic [DW-1:0]         test_data,
  output logic                  sum_clipped
);

  localparam int WAW = $clog2(WS_DEPTH);
  localparam int IAW = $clog2(IS_DEPTH);

  sat_cfg_t cfg;

  logic [NWS-1:0][DW-1:0]   ws_dly;
  logic [NBEAM-1:0][DW-1:0] beam_ws;
  logic signed [DW-1:0]     is_att;
  logic [NBEAM-1:0][DW-1:0] is_taps;
  logic [NBEAM-1:0][DW-1:0] beam_out;
  logic signed [DW-1:0]     sum_out;
  logic [NNODE-1:0][DW-1:0] nodes;

  sat_control_logic u_ctrl (
    .clk(clk), .rst_n(rst_n), .strobe(strobe), .addr(addr), .data(data), .cfg(cfg)
  );

  // Wanted-signal path delays
  for (genvar n = 0; n < NWS; n++) begin : g_ws
    delay_line #(.DW(DW), .DEPTH(WS_DEPTH)) u_ws_dly (
      .clk(clk), .rst_n(rst_n), .delay(cfg.ws_delay[n][WAW-1:0]),
      .din(wsd[n]), .dout(ws_dly[n])
    );
  end

  input_switching_matrix #(.DW(DW), .NIN(NWS), .NOUT(NBEAM)) u_matrix (
    .clk(clk), .rst_n(rst_n), .sel(cfg.beam_src), .din(ws_dly), .dout(beam_ws)
  );

  // Interference path
  attenuator #(.DW(DW), .KW(IGW)) u_is_gain (
    .clk(clk), .rst_n(rst_n), .k(cfg.is_gain), .din(is_in), .dout(is_att)
  );

  interference_delay_chain #(.DW(DW), .NTAP(NBEAM), .DEPTH(IS_DEPTH)) u_is_chain (
    .clk(clk), .rst_n(rst_n), .delay(cfg.is_delay[IAW-1:0]), .din(is_att), .taps(is_taps)
  );

  // Beams
  for (genvar b = 0; b < NBEAM; b++) begin : g_beam
    beam_channel #(.DW(DW), .PW(PW)) u_beam (
      .clk(clk), .rst_n(rst_n), .ws(beam_ws[b]), .isig(is_taps[b]),
      .gain(cfg.beam_gain[b]), .fw(cfg.beam_fw[b]), .dout(beam_out[b])
    );
  end

  beam_combiner #(.DW(DW), .N(NBEAM)) u_comb (
    .clk(clk), .rst_n(rst_n), .din(beam_out), .dout(sum_out), .sat_flag(sum_clipped)
  );

  // Observable nodes
  always_comb begin
    nodes = '0;
    nodes[NODE_SUM] = sum_out;
    for (int b = 0; b < NBEAM; b++) nodes[NODE_BEAM + b] = beam_out[b];
    for (int n = 0; n < NWS; n++)   nodes[NODE_WS + n]   = ws_dly[n];
    nodes[NODE_IS] = is_att;
  end

  test_mux #(.DW(DW), .N(NNODE)) u_test_mux (
    .clk(clk), .rst_n(rst_n), .sel(cfg.test_sel), .nodes(nodes), .dout(test_data)
  );

  test_mux #(.DW(DW), .N(NNODE)) u_dac_mux (
    .clk(clk), .rst_n(rst_n), .sel(cfg.dac_sel), .nodes(nodes), .dout(dac_data)
  );

  assign dac_clk  = clk;
  assign test_clk = clk;

endmodule
