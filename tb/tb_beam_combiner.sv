// Testbench for beam_combiner: random small and full-scale beam samples; the
// output must be the 12-bit clipped sum of the previous clock and sat_flag
// must mark exactly the clipped samples. Both clip directions must occur.
module tb_beam_combiner;
  logic clk = 0, rst_n = 0;
  logic [6:0][11:0] din;
  logic signed [11:0] dout;
  logic sat_flag;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;

  beam_combiner #(.DW(12), .N(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, e;
    bit c;
    din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      s = 0;
      for (int b = 0; b < 7; b++) begin
        din[b] = (i % 2) ? 12'($urandom) : 12'($signed(9'($urandom)));
        s += int'($signed(din[b]));
      end
      c = 0; e = s;
      if (s > 2047)  begin e = 2047;  c = 1; n_hi++; end
      if (s < -2048) begin e = -2048; c = 1; n_lo++; end
      @(posedge clk); #1;
      checks += 2;
      if (int'(dout) != e) begin failures++; if (failures < 10) $display("sum %0d got %0d", s, dout); end
      if (sat_flag != c)   begin failures++; if (failures < 10) $display("flag wrong for %0d", s); end
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) begin failures++; $display("clipping not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
