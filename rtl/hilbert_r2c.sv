// Real-to-complex converter ("R to C") of a beam.
//
// A real signal can only be shifted in frequency without creating a mirror
// image if it is first turned into its analytic signal x + j*H{x}, where H is
// the Hilbert transform. This block computes H{x} with a 31-tap type-III FIR
// whose odd taps are the ideal Hilbert response 2/(pi*n) shaped by a Hamming
// window; the even taps are zero. The in-phase output is the input delayed by
// the filter's group delay of 15 samples, so I and Q stay aligned.
//
// Coefficients, in units of 2^-11:
//   h[n] = round(2048 * 2/(pi*n) * (0.54 + 0.46*cos(2*pi*n/30))), n odd,
//   h[-n] = -h[n], n = 1..15.
// Only the name of this stage is given by the block diagram it comes from;
// the Hilbert filter, its length and window are this design's choice. Its
// gain is close to 1 from about 0.05*fs to 0.45*fs and falls towards DC and
// fs/2, as for any Hilbert FIR.
//
// Timing: i_out(n+17) = din(n); q_out(n+17) = H{din}(n), rounded and
// saturated to 12 bits.
module hilbert_r2c #(
  parameter int DW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] din,
  output logic signed [DW-1:0] i_out,
  output logic signed [DW-1:0] q_out
);
  import sat_pkg::*;

  localparam int NTAPS = 31;
  localparam int HALF  = 15;
  localparam int CF    = 11;   // coefficient fraction bits

  // h[1], h[3], ..., h[15]
  localparam int signed HC [8] = '{1291, 396, 201, 110, 58, 28, 12, 7};

  logic signed [DW-1:0] d [NTAPS];
  logic signed [31:0]   acc;
  logic signed [31:0]   acc_r;

  always_comb begin
    acc = '0;
    for (int m = 0; m < 8; m++) begin
      // tap k = 2m+1 sits at d[HALF+k] (multiplies x(n-k)), tap -k at d[HALF-k]
      acc = acc + HC[m] * (32'(d[HALF + 2*m + 1]) - 32'(d[HALF - 2*m - 1]));
    end
    acc_r = (acc + 32'sd1024) >>> CF;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < NTAPS; j++) d[j] <= '0;
      i_out <= '0;
      q_out <= '0;
    end else begin
      d[0] <= din;
      for (int j = 1; j < NTAPS; j++) d[j] <= d[j-1];
      i_out <= d[HALF];
      q_out <= sat12(acc_r);
    end
  end

endmodule
