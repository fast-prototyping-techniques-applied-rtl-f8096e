// Tapped delay chain for the interference signal.
//
// The attenuated interference signal is injected into every beam of a
// satellite, each time with a different delay: beam 0 gets it undelayed,
// beam b after b identical programmable delay elements in series. With one
// delay setting D per satellite, beam b sees the interference delayed by
// b*(D+1) samples relative to beam 0, which sets how coherent the
// interference is across beams. Six elements serve seven beams, as in the
// satellite block diagram; the per-element depth of 8192 words is this
// design's choice.
//
// Timing: taps[0] = din (combinational pass), taps[b](n) = din(n - b*(D+1)).
module interference_delay_chain #(
  parameter int DW    = 12,
  parameter int NTAP  = 7,
  parameter int DEPTH = 8192,
  localparam int AWD  = $clog2(DEPTH)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [AWD-1:0]                  delay,
  input  logic signed [DW-1:0]            din,
  output logic [NTAP-1:0][DW-1:0]         taps
);

  assign taps[0] = din;

  for (genvar b = 1; b < NTAP; b++) begin : g_elem
    delay_line #(.DW(DW), .DEPTH(DEPTH)) u_dly (
      .clk   (clk),
      .rst_n (rst_n),
      .delay (delay),
      .din   (taps[b-1]),
      .dout  (taps[b])
    );
  end

endmodule
