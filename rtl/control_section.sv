// Control section (the FPGA that faces the host).
//
// Receives register writes from the host and hands them to the satellites.
// A host write carries a 10-bit address {sel, reg} and 16-bit data: sel 0..2
// picks one satellite, sel 3 writes the same register in all of them (used,
// for example, to load the same wanted-signal delays everywhere). The write
// is registered and appears on the shared ADDRESS/DATA bus together with a
// one-clock DataStrobe on the selected satellite(s). wr_count counts the
// writes forwarded, for the host to check a configuration download.
// In the simulator this section sits behind a PCI target; here the host side
// is a plain write port clocked by the sample clock. The satellite select
// encoding and the broadcast are this design's choices.
//
// Timing: host_wr at clock n gives sat_strobe at clock n+1.
module control_section
  import sat_pkg::*;
#(
  parameter int NS = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            host_wr,
  input  logic [AW+1:0]   host_addr,
  input  logic [CW-1:0]   host_data,
  output logic [NS-1:0]   sat_strobe,
  output logic [AW-1:0]   sat_addr,
  output logic [CW-1:0]   sat_data,
  output logic [15:0]     wr_count
);

  logic [1:0] sel;
  assign sel = host_addr[AW+1:AW];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sat_strobe <= '0;
      sat_addr   <= '0;
      sat_data   <= '0;
      wr_count   <= '0;
    end else begin
      sat_strobe <= '0;
      if (host_wr) begin
        sat_addr <= host_addr[AW-1:0];
        sat_data <= host_data;
        wr_count <= wr_count + 1'b1;
        for (int s = 0; s < NS; s++)
          sat_strobe[s] <= (sel == 2'd3) || (int'(sel) == s);
      end
    end
  end

endmodule
