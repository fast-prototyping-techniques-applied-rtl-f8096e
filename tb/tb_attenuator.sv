// Testbench for attenuator: the 36 dB (6-bit) and 72 dB (12-bit) settings.
// Random samples and gains are checked against (x*k + 2^(KW-1)) >> KW, and
// a few gains against their decibel values: k = 45/64 is -3.06 dB,
// k = 228/4096 is -25.08 dB, k = 1 of each is the bottom of its range.
module tb_attenuator;
  logic clk = 0, rst_n = 0;
  logic [5:0]  k6;
  logic [11:0] k12;
  logic signed [11:0] din, d6, d12;
  int checks = 0, failures = 0;

  attenuator #(.DW(12), .KW(6))  dut6  (.clk, .rst_n, .k(k6),  .din, .dout(d6));
  attenuator #(.DW(12), .KW(12)) dut12 (.clk, .rst_n, .k(k12), .din, .dout(d12));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_att(int x, int k, int kw);
    longint p = longint'(x) * k + (longint'(1) << (kw - 1));
    return int'(p >>> kw);
  endfunction

  task automatic apply(int x, int a, int b);
    din = 12'(x); k6 = 6'(a); k12 = 12'(b);
    @(posedge clk); #1;
    checks += 2;
    if (int'(d6) != ref_att(x, a, 6)) begin
      failures++; $display("KW6 x=%0d k=%0d got %0d", x, a, d6);
    end
    if (int'(d12) != ref_att(x, b, 12)) begin
      failures++; $display("KW12 x=%0d k=%0d got %0d", x, b, d12);
    end
  endtask

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real db(real g);
    return 20.0 * $log10(g);
  endfunction

  initial begin
    din = 0; k6 = 0; k12 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    apply(2047, 45, 228);
    checks++;
    if (absr(db(real'(d6) / 2047.0) + 3.06) > 0.02) begin failures++; $display("-3.06 dB step wrong"); end
    checks++;
    if (absr(db(real'(d12) / 2047.0) + 25.08) > 0.05) begin failures++; $display("-25.08 dB step wrong"); end
    apply(-2048, 0, 0);            // -inf
    checks++; if (d6 != 0 || d12 != 0) begin failures++; $display("mute failed"); end
    apply(-2048, 63, 4095);
    apply(2047, 1, 1);
    apply(-2048, 1, 1);
    for (int i = 0; i < 5000; i++) apply(int'($signed(12'($urandom))), int'($urandom_range(0, 63)), int'($urandom_range(0, 4095)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
