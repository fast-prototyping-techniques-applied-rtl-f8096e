// Testbench for beam_channel: a wanted-signal tone plus random
// interference, several gains (including mute) and Doppler words (0, +/-128,
// large), changed at run time. The expected output is rebuilt here stage by
// stage (saturating add, k/64 attenuation, windowed Hilbert FIR, rotation by
// the accumulated NCO phase in real arithmetic, real part) and compared
// within 3 LSB every clock. The 35-clock latency is checked on a step.
module tb_beam_channel;
  localparam real PI = 3.14159265358979;
  localparam int HS = 8192;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] ws, isig, dout;
  logic [5:0] gain;
  logic signed [15:0] fw;
  int checks = 0, failures = 0, maxerr = 0;
  int sumr [HS], aa [HS], pp [HS], bo [HS];
  int hc [-15:15];
  int e = 0, ph_cur = 0;

  beam_channel #(.DW(12), .PW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction
  function automatic int sat(longint v);
    return (v > 2047) ? 2047 : (v < -2048) ? -2048 : int'(v);
  endfunction
  function automatic int gA(int i);
    return (i < 0) ? 0 : aa[i % HS];
  endfunction
  function automatic int gS(int i);
    return (i < 0) ? 0 : sumr[i % HS];
  endfunction

  // one clock edge: model update with the settings in effect at this edge
  task automatic step(int w, int x);
    longint q;
    int ii, qq, err;
    real ph;
    ws = 12'(w); isig = 12'(x);
    sumr[e % HS] = sat(longint'(w) + x);
    aa[e % HS]   = int'((longint'(gS(e - 1)) * gain + 32) >>> 6);
    pp[e % HS]   = ph_cur;
    ph_cur = (ph_cur + int'(fw)) & 16'hFFFF;
    if (e < 15) bo[e % HS] = 0;
    else begin
      ii = gA(e - 33);
      q = 0;
      for (int j = 0; j < 31; j++) q += longint'(hc[j - 15]) * gA(e - 18 - j);
      qq = sat((q + 1024) >>> 11);
      ph = 2.0 * PI * real'(pp[(e - 15) % HS]) / 65536.0;
      bo[e % HS] = sat(longint'(rnd(real'(ii) * $cos(ph) - real'(qq) * $sin(ph))));
    end
    @(posedge clk); #1;
    err = int'(dout) - bo[e % HS];
    if (err < 0) err = -err;
    if (err > maxerr) maxerr = err;
    checks++;
    if (err > 3) begin failures++; if (failures < 10) $display("e=%0d dout %0d exp %0d", e, dout, bo[e % HS]); end
    e++;
  endtask

  initial begin
    int first;
    for (int k = -15; k <= 15; k++)
      hc[k] = (k % 2 == 0) ? 0 : rnd(2048.0 * 2.0 / (PI * k) * (0.54 + 0.46 * $cos(2.0 * PI * k / 30.0)));
    ws = 0; isig = 0; gain = 63; fw = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // latency: a step on ws at full gain, no Doppler
    for (int i = 0; i < 5; i++) step(0, 0);
    first = -1;
    for (int i = 0; i < 60; i++) begin
      step(1000, 0);
      if (first < 0 && dout != 0) first = i + 1;
    end
    checks++;
    if (first != 35) begin failures++; $display("latency %0d, expected 35", first); end
    for (int s = 0; s < 8; s++) begin
      case (s)
        0: begin gain = 63; fw = 0;      end
        1: begin gain = 45; fw = 128;    end
        2: begin gain = 32; fw = -128;   end
        3: begin gain = 0;  fw = 7;      end
        4: begin gain = 63; fw = 9000;   end
        5: begin gain = 1;  fw = -5;     end
        6: begin gain = 63; fw = -20000; end
        default: begin gain = 50; fw = 1; end
      endcase
      for (int i = 0; i < 600; i++)
        step(rnd(1500.0 * $cos(2.0 * PI * 0.13 * e)), int'($signed(12'($urandom))) >>> 2);
    end
    // saturating adder: both inputs near full scale
    gain = 63; fw = 0;
    for (int i = 0; i < 200; i++) step((i % 2) ? 2000 : -2000, (i % 2) ? 1500 : -1500);
    $display("max error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
