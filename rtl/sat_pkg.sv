// Shared types and constants of the satellite-constellation channel simulator.
//
// Every datapath node carries one 12-bit two's complement sample per clock.
// A satellite has seven beams and three wanted-signal inputs (WSD1..WSD3);
// the interference input has its own attenuator and a tapped delay chain.
// The register map of one satellite's control logic is defined here so that
// the control logic, the testbenches and any host software agree on it:
//
//   0x00+b  beam b gain k, gain = k/64 (6 bits, 0 mutes the beam)
//   0x08+b  beam b Doppler frequency word, signed, f = fw * fs / 2^16
//   0x10+b  beam b source: 0 none, 1..3 = delayed WSD1..WSD3
//   0x18    interference gain k, gain = k/4096 (12 bits, 0 mutes it)
//   0x19    interference delay D per chain element (13 bits)
//   0x1A+n  delay of wanted input WSD(n+1) (13 bits), n = 0..2
//   0x1D    test multiplexer node select (4 bits)
//   0x1E    DAC multiplexer node select (4 bits, 0 = satellite output)
//
// The 8-bit address, 16-bit data and 12-bit sample widths follow the
// satellite block diagram; the map itself is this design's choice.
package sat_pkg;

  localparam int DW      = 12;   // sample width
  localparam int NBEAM   = 7;    // beams per satellite
  localparam int NWS     = 3;    // wanted-signal inputs
  localparam int NSAT    = 3;    // satellites in the constellation
  localparam int AW      = 8;    // control address width
  localparam int CW      = 16;   // control data width
  localparam int BGW     = 6;    // beam gain word (36 dB range)
  localparam int IGW     = 12;   // interference gain word (72 dB range)
  localparam int PW      = 16;   // NCO phase / frequency word width
  localparam int DLYW    = 13;   // delay word: up to 8192 samples
  localparam int NNODE   = 16;   // nodes seen by the test / DAC multiplexers

  typedef logic signed [DW-1:0] sample_t;

  // Register addresses
  localparam logic [AW-1:0] A_BEAM_GAIN = 8'h00;
  localparam logic [AW-1:0] A_BEAM_FW   = 8'h08;
  localparam logic [AW-1:0] A_BEAM_SRC  = 8'h10;
  localparam logic [AW-1:0] A_IS_GAIN   = 8'h18;
  localparam logic [AW-1:0] A_IS_DELAY  = 8'h19;
  localparam logic [AW-1:0] A_WS_DELAY  = 8'h1A;
  localparam logic [AW-1:0] A_TEST_SEL  = 8'h1D;
  localparam logic [AW-1:0] A_DAC_SEL   = 8'h1E;

  // Multiplexer node numbers
  localparam int NODE_SUM  = 0;   // satellite output (beam combiner)
  localparam int NODE_BEAM = 1;   // 1..7: beam outputs
  localparam int NODE_WS   = 8;   // 8..10: delayed wanted inputs
  localparam int NODE_IS   = 11;  // attenuated interference signal

  // All settings of one satellite
  typedef struct packed {
    logic [NBEAM-1:0][BGW-1:0]  beam_gain;
    logic [NBEAM-1:0][PW-1:0]   beam_fw;
    logic [NBEAM-1:0][1:0]      beam_src;
    logic [IGW-1:0]             is_gain;
    logic [DLYW-1:0]            is_delay;
    logic [NWS-1:0][DLYW-1:0]   ws_delay;
    logic [3:0]                 test_sel;
    logic [3:0]                 dac_sel;
  } sat_cfg_t;

  // Saturate a wider signed value to DW bits
  function automatic sample_t sat12(input logic signed [31:0] v);
    if (v > 32'sd2047)       return sample_t'(12'sh7FF);
    else if (v < -32'sd2048) return sample_t'(12'sh800);
    else                     return sample_t'(v[DW-1:0]);
  endfunction

endpackage
