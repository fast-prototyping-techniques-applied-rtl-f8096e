// Input switching matrix of one satellite.
//
// Routes the three wanted-signal inputs to the seven beams. Each beam has a
// 2-bit source select: 0 leaves the beam without a wanted signal, 1..3 takes
// WSD1..WSD3. One input may feed several beams (diversity, beam hand-over)
// and several inputs may feed different beams of the same satellite. The
// per-beam select is this design's encoding of the routing.
//
// Timing: one register stage, dout[b](n+1) = din[sel[b]-1](n).
module input_switching_matrix #(
  parameter int DW   = 12,
  parameter int NIN  = 3,
  parameter int NOUT = 7
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NOUT-1:0][1:0]   sel,
  input  logic [NIN-1:0][DW-1:0] din,
  output logic [NOUT-1:0][DW-1:0] dout
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dout <= '0;
    end else begin
      for (int b = 0; b < NOUT; b++) begin
        if (sel[b] == 2'd0 || int'(sel[b]) > NIN) dout[b] <= '0;
        else                                      dout[b] <= din[int'(sel[b]) - 1];
      end
    end
  end

endmodule
