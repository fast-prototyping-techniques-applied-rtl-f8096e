// Beam combiner: the satellite output is the sum of its seven beams.
//
// The seven 12-bit beam outputs are added at full precision and the sum is
// clipped to the 12-bit two's complement range; sat_flag marks every sample
// that was clipped. The sum is not rescaled: the beam attenuators are where
// the levels are set (the scaling rule is this design's choice).
//
// Timing: one register stage, dout(n+1) = sat(sum din(n)).
module beam_combiner #(
  parameter int DW = 12,
  parameter int N  = 7
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0][DW-1:0]  din,
  output logic signed [DW-1:0]  dout,
  output logic                  sat_flag
);

  localparam int SW = DW + $clog2(N);
  localparam logic signed [SW-1:0] MAXV = SW'((1 << (DW-1)) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(1 << (DW-1));

  logic signed [SW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int b = 0; b < N; b++) sum = sum + SW'($signed(din[b]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dout     <= '0;
      sat_flag <= 1'b0;
    end else if (sum > MAXV) begin
      dout     <= MAXV[DW-1:0];
      sat_flag <= 1'b1;
    end else if (sum < MINV) begin
      dout     <= MINV[DW-1:0];
      sat_flag <= 1'b1;
    end else begin
      dout     <= sum[DW-1:0];
      sat_flag <= 1'b0;
    end
  end

endmodule
