// Control logic of one satellite: its configuration register file.
//
// The control section writes settings over an 8-bit ADDRESS, 16-bit DATA and
// a DataStrobe. On every clock where strobe is high, the register named by
// addr takes the low bits of data; writes to unused addresses are ignored.
// The whole configuration is presented as one sat_cfg_t struct (see sat_pkg
// for the register map). The bus widths follow the satellite block diagram;
// the register map, the one-clock strobe synchronous to the sample clock and
// the all-zero reset state (all beams muted, nothing routed, DAC showing the
// satellite output) are this design's choices. Settings may be changed while
// the datapath runs; they act from the clock after the strobe.
module sat_control_logic
  import sat_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          strobe,
  input  logic [AW-1:0] addr,
  input  logic [CW-1:0] data,
  output sat_cfg_t      cfg
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg <= '0;
    end else if (strobe) begin
      for (int b = 0; b < NBEAM; b++) begin
        if (addr == A_BEAM_GAIN + AW'(b)) cfg.beam_gain[b] <= data[BGW-1:0];
        if (addr == A_BEAM_FW   + AW'(b)) cfg.beam_fw[b]   <= data[PW-1:0];
        if (addr == A_BEAM_SRC  + AW'(b)) cfg.beam_src[b]  <= data[1:0];
      end
      for (int n = 0; n < NWS; n++) begin
        if (addr == A_WS_DELAY + AW'(n)) cfg.ws_delay[n] <= data[DLYW-1:0];
      end
      if (addr == A_IS_GAIN)  cfg.is_gain  <= data[IGW-1:0];
      if (addr == A_IS_DELAY) cfg.is_delay <= data[DLYW-1:0];
      if (addr == A_TEST_SEL) cfg.test_sel <= data[3:0];
      if (addr == A_DAC_SEL)  cfg.dac_sel  <= data[3:0];
    end
  end

endmodule
