// Programmable digital attenuator.
//
// Multiplies a 12-bit sample by the linear gain k / 2^KW and rounds half up:
//   dout = (din * k + 2^(KW-1)) >> KW.
// k = 0 mutes the signal ("-inf"); the largest k gives (2^KW-1)/2^KW.
// With KW = 6 the steps are those of the 36 dB beam attenuator
// (20*log10(1/64) = -36.1 dB); with KW = 12 those of the 72 dB interference
// attenuator (20*log10(1/4096) = -72.2 dB). The linear-gain reading of the
// attenuation settings is derived from the settings the simulator's control
// program offers (for example -3.06 dB = 45/64); the rounding is this
// design's choice. The gain is never above 1, so the result never overflows.
//
// Timing: one register stage, dout(n+1) = f(din(n), k(n)).
module attenuator #(
  parameter int DW = 12,
  parameter int KW = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [KW-1:0]        k,
  input  logic signed [DW-1:0] din,
  output logic signed [DW-1:0] dout
);

  logic signed [DW+KW:0] prod;
  logic signed [DW+KW:0] rounded;

  always_comb begin
    prod    = din * $signed({1'b0, k});
    rounded = prod + (DW+KW+1)'(1 << (KW-1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) dout <= '0;
    else        dout <= DW'(rounded >>> KW);
  end

endmodule
