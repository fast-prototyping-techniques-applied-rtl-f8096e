// Testbench for sat_control_logic: writes every register of the map with
// random values, in random order, with writes to unused addresses and data
// presented without a strobe in between; after each clock the whole
// configuration must equal a copy kept here.
module tb_sat_control_logic;
  import sat_pkg::*;
  logic clk = 0, rst_n = 0;
  logic strobe;
  logic [7:0] addr;
  logic [15:0] data;
  sat_cfg_t cfg, mdl;
  int checks = 0, failures = 0;

  sat_control_logic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int d, bit s);
    strobe = s; addr = 8'(a); data = 16'(d);
    if (s) begin
      if (a < 7)                    mdl.beam_gain[a]      = 6'(d);
      else if (a >= 8 && a < 15)    mdl.beam_fw[a - 8]    = 16'(d);
      else if (a >= 16 && a < 23)   mdl.beam_src[a - 16]  = 2'(d);
      else if (a == 24)             mdl.is_gain           = 12'(d);
      else if (a == 25)             mdl.is_delay          = 13'(d);
      else if (a >= 26 && a < 29)   mdl.ws_delay[a - 26]  = 13'(d);
      else if (a == 29)             mdl.test_sel          = 4'(d);
      else if (a == 30)             mdl.dac_sel           = 4'(d);
    end
    @(posedge clk); #1;
    checks++;
    if (cfg !== mdl) begin failures++; if (failures < 10) $display("addr %0h data %0h: mismatch", a, d); end
  endtask

  initial begin
    strobe = 0; addr = 0; data = 0; mdl = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wr(0, 0, 0);
    for (int a = 0; a < 32; a++) wr(a, int'($urandom), 1);
    for (int i = 0; i < 3000; i++) wr(int'($urandom_range(0, 40)), int'($urandom), (i % 4) != 0);
    for (int a = 32; a < 256; a++) wr(a, int'($urandom), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
