// Hardware channel simulator for a constellation of three non-geostationary
// satellites with seven beams each.
//
// Six signal inputs: the wanted signals WSD1..WSD3 go to every satellite,
// and each satellite has its own interference input IS1..IS3. Each satellite
// delays, routes, attenuates, Doppler-shifts and combines them (see
// satellite.sv) and drives a 12-bit two's complement output with its clock,
// meant for an external DAC, plus a 12-bit test port. The control section
// distributes register writes from the host port to the satellites. The
// partitioning, one satellite per FPGA plus one control FPGA, follows the
// original system; the inter-FPGA buses are plain wires here.
//
// Timing: see satellite.sv; host writes act two clocks after host_wr.
module constellation_simulator
  import sat_pkg::*;
#(
  parameter int WS_DEPTH = 8192,
  parameter int IS_DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NWS-1:0][DW-1:0]   wsd,
  input  logic [NSAT-1:0][DW-1:0]  is_in,
  input  logic                     host_wr,
  input  logic [AW+1:0]            host_addr,
  input  logic [CW-1:0]            host_data,
  output logic [15:0]              host_wr_count,
  output logic [NSAT-1:0][DW-1:0]  dac_data,
  output logic [NSAT-1:0]          dac_clk,
  output logic [NSAT-1:0]          test_clk,
  output logic [NSAT-1:0][DW-1:0]  test_data,
  output logic [NSAT-1:0]          sum_clipped
);

  logic [NSAT-1:0] strobe;
  logic [AW-1:0]   bus_addr;
  logic [CW-1:0]   bus_data;

  control_section #(.NS(NSAT)) u_control (
    .clk(clk), .rst_n(rst_n), .host_wr(host_wr), .host_addr(host_addr),
    .host_data(host_data), .sat_strobe(strobe), .sat_addr(bus_addr),
    .sat_data(bus_data), .wr_count(host_wr_count)
  );

  for (genvar s = 0; s < NSAT; s++) begin : g_sat
    satellite #(.WS_DEPTH(WS_DEPTH), .IS_DEPTH(IS_DEPTH)) u_sat (
      .clk(clk), .rst_n(rst_n), .wsd(wsd), .is_in(is_in[s]),
      .strobe(strobe[s]), .addr(bus_addr), .data(bus_data),
      .dac_data(dac_data[s]), .dac_clk(dac_clk[s]), .test_clk(test_clk[s]),
      .test_data(test_data[s]), .sum_clipped(sum_clipped[s])
    );
  end

endmodule
