// One beam of a satellite.
//
// The beam's wanted signal (from the switching matrix) and its tap of the
// delayed interference signal are added with saturation; the sum is
// attenuated by the beam's 36 dB attenuator (gain k/64) to set the path
// loss, turned into an analytic signal (R to C), shifted in frequency by the
// Doppler NCO and brought back to a real 12-bit sample (C to R). The order
// of the stages is that of the satellite block diagram.
//
// Interface: ws, isig and dout are 12-bit two's complement samples, one per
// clock; gain and fw are static settings from the control registers.
// Timing: 35 clocks from ws/isig to dout
//   (adder 1 + attenuator 1 + Hilbert 17 + Doppler 16).
module beam_channel #(
  parameter int DW = 12,
  parameter int PW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] ws,
  input  logic signed [DW-1:0] isig,
  input  logic [5:0]           gain,
  input  logic signed [PW-1:0] fw,
  output logic signed [DW-1:0] dout
);
  import sat_pkg::*;

  logic signed [DW-1:0] sum_r, att, i_c, q_c;

  always_ff @(posedge clk) begin
    if (!rst_n) sum_r <= '0;
    else        sum_r <= sat12(32'(ws) + 32'(isig));
  end

  attenuator #(.DW(DW), .KW(6)) u_gain (
    .clk(clk), .rst_n(rst_n), .k(gain), .din(sum_r), .dout(att)
  );

  hilbert_r2c #(.DW(DW)) u_r2c (
    .clk(clk), .rst_n(rst_n), .din(att), .i_out(i_c), .q_out(q_c)
  );

  doppler_nco #(.DW(DW), .PW(PW)) u_dop (
    .clk(clk), .rst_n(rst_n), .fw(fw), .i_in(i_c), .q_in(q_c), .dout(dout)
  );

endmodule
