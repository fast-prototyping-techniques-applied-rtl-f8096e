// Testbench for test_mux: random node values and selections; the output is
// the selected node of the previous clock.
module tb_test_mux;
  logic clk = 0, rst_n = 0;
  logic [3:0] sel;
  logic [15:0][11:0] nodes;
  logic [11:0] dout;
  logic [11:0] exp_v;
  int checks = 0, failures = 0;

  test_mux #(.DW(12), .N(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = '0; nodes = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      for (int n = 0; n < 16; n++) nodes[n] = 12'($urandom);
      sel = 4'(i % 16);
      exp_v = nodes[i % 16];
      @(posedge clk); #1;
      checks++;
      if (dout != exp_v) begin failures++; if (failures < 10) $display("sel %0d got %h exp %h", sel, dout, exp_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
