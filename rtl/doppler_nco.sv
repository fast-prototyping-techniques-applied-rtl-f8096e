// Doppler shifter of a beam: NCO, complex mixer and complex-to-real stage.
//
// A numerically controlled oscillator advances a 16-bit phase accumulator by
// the signed frequency word fw every sample, so the shift is
//   f = fw * fs / 2^16   (fs = sample rate; 117.1875 Hz steps at 7.68 MHz,
//                          +/-15 kHz is fw = +/-128).
// The complex input sample (i + j*q) is rotated by the accumulator phase with
// a 14-stage pipelined CORDIC in rotation mode, which needs no sine table.
// The real part of the rotated sample is kept ("C to R"), multiplied by
// 1/K = 0.60725 (19898 / 2^15) to remove the CORDIC gain, rounded and
// saturated to 12 bits:
//   dout = Re{ (i + j*q) * exp(j*2*pi*phase/2^16) }.
// The rotation first maps the phase into [-90, +90) degrees by negating the
// vector when the phase lies in the other half-plane. The step size of the
// NCO follows the Doppler settings of the simulator's control program; the
// CORDIC structure, its length and the 4 internal guard bits are this
// design's choices.
//
// Timing: 16 clocks from i_in/q_in to dout; the phase applied to the sample
// entering at clock n is the accumulator value at clock n (0 after reset).
module doppler_nco #(
  parameter int DW   = 12,
  parameter int PW   = 16,
  parameter int ITER = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [PW-1:0] fw,
  input  logic signed [DW-1:0] i_in,
  input  logic signed [DW-1:0] q_in,
  output logic signed [DW-1:0] dout
);
  import sat_pkg::*;

  localparam int W = DW + 4;   // 2 bits of headroom, 2 guard bits

  // round(atan(2^-i) * 2^16 / (2*pi))
  localparam int ATAN [14] = '{8192, 4836, 2555, 1297, 651, 326, 163, 81, 41, 20, 10, 5, 3, 1};
  localparam int signed INV_K = 19898;   // round(2^15 / 1.646760)

  logic [PW-1:0] phase;

  logic signed [W-1:0]  x [ITER+1];
  logic signed [W-1:0]  y [ITER+1];
  logic signed [PW-1:0] z [ITER+1];

  logic signed [W-1:0]  xin, yin;
  logic signed [31:0]   scaled;

  assign xin = W'(i_in) <<< 2;
  assign yin = W'(q_in) <<< 2;

  // Phase accumulator
  always_ff @(posedge clk) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + fw;
  end

  // Stage 0: bring the angle into [-90, +90) degrees
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0;
    end else if (phase[PW-1] ^ phase[PW-2]) begin
      x[0] <= -xin;
      y[0] <= -yin;
      z[0] <= $signed({~phase[PW-1], phase[PW-2:0]});
    end else begin
      x[0] <= xin;
      y[0] <= yin;
      z[0] <= $signed(phase);
    end
  end

  // CORDIC micro-rotations
  for (genvar s = 0; s < ITER; s++) begin : g_iter
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        x[s+1] <= '0; y[s+1] <= '0; z[s+1] <= '0;
      end else if (!z[s][PW-1]) begin
        x[s+1] <= x[s] - (y[s] >>> s);
        y[s+1] <= y[s] + (x[s] >>> s);
        z[s+1] <= z[s] - PW'(ATAN[s]);
      end else begin
        x[s+1] <= x[s] + (y[s] >>> s);
        y[s+1] <= y[s] - (x[s] >>> s);
        z[s+1] <= z[s] + PW'(ATAN[s]);
      end
    end
  end

  // C to R: real part, gain correction, rounding, saturation
  assign scaled = (32'(x[ITER]) * INV_K + 32'sd65536) >>> 17;

  always_ff @(posedge clk) begin
    if (!rst_n) dout <= '0;
    else        dout <= sat12(scaled);
  end

endmodule
