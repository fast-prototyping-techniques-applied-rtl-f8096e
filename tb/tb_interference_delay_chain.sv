// Testbench for interference_delay_chain: random interference samples, chain
// delays D of 0, 3 and 40 (changed at run time) and the largest D of a
// reduced 64-word element. Tap b must equal the input delayed by b*(D+1).
module tb_interference_delay_chain;
  localparam int DW = 12, NTAP = 7, DEPTH = 64, AWD = 6;
  logic clk = 0, rst_n = 0;
  logic [AWD-1:0] delay;
  logic signed [DW-1:0] din;
  logic [NTAP-1:0][DW-1:0] taps;
  int checks = 0, failures = 0;
  int hist [16384];
  int t;

  interference_delay_chain #(.DW(DW), .NTAP(NTAP), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // taps[b] held during the cycle after clock t
  function automatic int expect_tap(int b, int d);
    int idx;
    if (b == 0) return hist[t];
    idx = t + 1 - b * (d + 1);
    return (idx < 0) ? 0 : hist[idx];
  endfunction

  task automatic run(input int d, input int n, input int settle);
    delay = AWD'(d);
    repeat (n) begin
      din = DW'($urandom);
      hist[t] = int'($signed(din));
      @(posedge clk); #1;
      if (settle <= 0) begin
        for (int b = 0; b < NTAP; b++) begin
          checks++;
          if (int'($signed(taps[b])) != expect_tap(b, d)) begin
            failures++;
            if (failures < 10) $display("t=%0d b=%0d got %0d exp %0d", t, b, $signed(taps[b]), expect_tap(b, d));
          end
        end
      end
      settle--;
      t++;
    end
  endtask

  initial begin
    delay = '0; din = '0; t = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(3, 200, 0);
    run(0, 100, 7);              // a delay change flushes through the chain
    run(40, 600, 6 * 41);
    run(63, 800, 6 * 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
