// Node multiplexer for the test connector and the DAC.
//
// Selects one of N internal 12-bit nodes of a satellite and registers it.
// Each satellite uses two: one drives the 12-bit test connector, the other
// chooses what the DAC converts (the satellite output by default). Node
// numbering is defined in sat_pkg: 0 satellite output, 1..7 beam outputs,
// 8..10 delayed wanted inputs, 11 attenuated interference, others zero. The
// node list is this design's choice.
//
// Timing: one register stage, dout(n+1) = nodes[sel](n).
module test_mux #(
  parameter int DW = 12,
  parameter int N  = 16,
  localparam int SW = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [SW-1:0]         sel,
  input  logic [N-1:0][DW-1:0]  nodes,
  output logic [DW-1:0]         dout
);

  always_ff @(posedge clk) begin
    if (!rst_n) dout <= '0;
    else        dout <= nodes[sel];
  end

endmodule
