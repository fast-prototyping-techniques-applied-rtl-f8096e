// Testbench for control_section: host writes to each satellite and to all
// (select 3), back to back and with gaps. One clock after each write the
// bus must carry its address and data with the strobe of the selected
// satellite(s) only; without a write no strobe may be active. wr_count must
// count the writes.
module tb_control_section;
  logic clk = 0, rst_n = 0;
  logic host_wr;
  logic [9:0] host_addr;
  logic [15:0] host_data;
  logic [2:0] sat_strobe;
  logic [7:0] sat_addr;
  logic [15:0] sat_data;
  logic [15:0] wr_count;
  int checks = 0, failures = 0, nwr = 0;

  control_section #(.NS(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp_s;
    host_wr = 0; host_addr = 0; host_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      host_wr = ($urandom_range(0, 3) != 0);
      host_addr = 10'($urandom);
      host_data = 16'($urandom);
      case (host_addr[9:8])
        2'd0: exp_s = 3'b001; 2'd1: exp_s = 3'b010; 2'd2: exp_s = 3'b100; default: exp_s = 3'b111;
      endcase
      if (!host_wr) exp_s = 3'b000;
      else nwr++;
      @(posedge clk); #1;
      checks += 2;
      if (sat_strobe != exp_s) begin failures++; if (failures < 10) $display("strobe %b exp %b", sat_strobe, exp_s); end
      if (wr_count != 16'(nwr)) begin failures++; if (failures < 10) $display("count %0d exp %0d", wr_count, nwr); end
      if (host_wr) begin
        checks++;
        if (sat_addr != host_addr[7:0] || sat_data != host_data) begin failures++; if (failures < 10) $display("bus mismatch"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
