// Testbench for input_switching_matrix: random routings (including "none"
// and one input on several beams) and random samples; every beam output
// must be the selected input of the previous clock, or 0.
module tb_input_switching_matrix;
  logic clk = 0, rst_n = 0;
  logic [6:0][1:0]  sel;
  logic [2:0][11:0] din;
  logic [6:0][11:0] dout;
  int checks = 0, failures = 0;
  logic [2:0][11:0] din_q;
  logic [6:0][1:0]  sel_q;

  input_switching_matrix #(.DW(12), .NIN(3), .NOUT(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = '0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      sel = 14'($urandom);
      if (i % 5 == 0) sel = {7{2'd2}};     // one input on all beams
      din = 36'({$urandom, $urandom});
      din_q = din; sel_q = sel;
      @(posedge clk); #1;
      for (int b = 0; b < 7; b++) begin
        checks++;
        if (dout[b] != ((sel_q[b] == 0) ? 12'd0 : din_q[sel_q[b] - 1])) begin
          failures++;
          if (failures < 10) $display("i=%0d beam %0d sel %0d got %h", i, b, sel_q[b], dout[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
