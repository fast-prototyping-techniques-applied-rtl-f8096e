// Testbench for delay_line: random samples through the full 8192-word RAM at
// several programmed delays, including 0, 1 and the maximum 8191, changed at
// run time. Expected output after clock t is din(t - delay) with samples
// before reset counted as 0.
module tb_delay_line;
  localparam int DW = 12, DEPTH = 8192, AWD = 13;
  logic clk = 0, rst_n = 0;
  logic [AWD-1:0] delay;
  logic signed [DW-1:0] din, dout;
  int checks = 0, failures = 0;
  int hist [65536];
  int t;

  delay_line #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int d, input int n);
    int exp_v;
    delay = AWD'(d);
    repeat (n) begin
      din = DW'($urandom);
      hist[t] = int'(din);
      @(posedge clk); #1;
      exp_v = (t - d < 0) ? 0 : hist[t - d];
      checks++;
      if (int'(dout) != exp_v) begin
        failures++;
        if (failures < 10) $display("t=%0d d=%0d dout=%0d exp=%0d", t, d, dout, exp_v);
      end
      t++;
    end
  endtask

  initial begin
    delay = '0; din = '0; t = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(5, 300);       // starts from reset: first 5 outputs must be 0
    run(0, 50);
    run(1, 50);
    run(100, 400);
    run(8191, 9000);   // longest delay of the RAM
    run(37, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
