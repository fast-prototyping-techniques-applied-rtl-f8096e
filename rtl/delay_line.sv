// Programmable sample delay line.
//
// Delays a stream of samples by delay+1 clocks, delay in 0..DEPTH-1, so with
// the default DEPTH of 8192 a signal can be held back by 1 to 8192 samples,
// the range the simulator offers for path delays. The samples live in a
// single-port-write, one-read RAM used as a circular buffer: each clock the
// input is written at the write pointer and the word written `delay` clocks
// earlier is read at (pointer - delay). A delay of 0 bypasses the RAM.
//
// Until `delay` samples have entered since reset the output is forced to 0,
// so stale RAM contents never reach the datapath (a choice of this design).
// Changing `delay` at run time takes effect on the next clock.
//
// Timing: dout(n+1) = din(n - delay). One register stage.
module delay_line #(
  parameter int DW    = 12,
  parameter int DEPTH = 8192,
  localparam int AWD  = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [AWD-1:0]       delay,
  input  logic signed [DW-1:0] din,
  output logic signed [DW-1:0] dout
);

  logic signed [DW-1:0] mem [DEPTH];
  logic [AWD-1:0]       wptr;
  logic [AWD:0]         filled;   // samples written since reset, saturating at DEPTH
  logic [AWD-1:0]       raddr;

  assign raddr = wptr - delay;

  always_ff @(posedge clk) begin
    mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr   <= '0;
      filled <= '0;
      dout   <= '0;
    end else begin
      wptr <= wptr + 1'b1;
      if (filled != (AWD+1)'(DEPTH)) filled <= filled + 1'b1;
      if (delay == '0)                    dout <= din;
      else if (filled < {1'b0, delay})    dout <= '0;
      else                                dout <= mem[raddr];
    end
  end

endmodule
