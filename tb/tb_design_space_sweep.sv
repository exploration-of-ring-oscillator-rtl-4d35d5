// Design-space sweep: runs the sensor configurations of the reference study
// through the sensor RTL.
//
// Part 1 measures, at 46 C and t_m = 2^16 cycles, eight all-inverter rings
// (17 to 111 inverters) and seven inverter/latch mixes of 47 elements (0 to
// 46 latches). Every count is checked against window time / (2 * ring period)
// computed here from the model's stage delays (+-2). For the all-inverter
// rings the count is also compared with the published average counts at
// 46 C (24913 ... 5038); the model is fitted to two of them, so within 10 %
// is required. Part 2 measures the 47-inverter ring at 40 C and 100 C and
// derives the resolution in counts per degree, which must be within 5 % of
// the published 8.81. Part 3 runs the default ring (23 inverters, 24
// latches) with a 22-bit counter over t_m = 2^13, 2^16, 2^17, 2^18 and 2^21
// cycles; each count must match the expected value (+-2). The model has no
// noise, so only the quantization part of the noise study is reproduced.
`timescale 1ns / 1ps
module tb_design_space_sweep;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int NCFG = 15;
  // Ring configurations: inverters and latches.
  localparam int CFG_INV   [NCFG] = '{17, 23, 31, 47, 63, 79, 95, 111, 31, 23, 15, 9, 5, 1, 47};
  localparam int CFG_LATCH [NCFG] = '{ 0,  0,  0,  0,  0,  0,  0,   0, 16, 24, 32, 38, 42, 46, 0};
  // Published average counts at 46 C for the all-inverter rings.
  localparam int PUB_COUNT [8] = '{24913, 18913, 16263, 11495, 8817, 6956, 5889, 5038};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic en = 1'b0, clr = 1'b0;
  logic [15:0] s [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    ro_sensor #(.N_INV(CFG_INV[c]), .N_LATCH(CFG_LATCH[c])) u_sensor (
      .enable(en), .clk(clk), .rst(clr), .S(s[c])
    );
  end

  // Default ring with a counter wide enough for t_m = 2^21.
  logic en_w = 1'b0, clr_w = 1'b0;
  logic [21:0] s_w;
  ro_sensor #(.N_COUNTER(22)) u_wide (.enable(en_w), .clk(clk), .rst(clr_w), .S(s_w));

  function automatic real period_ns(int n_inv, int n_latch, real temp_c);
    return 2.0 * (2.226 + n_inv * 0.256 + n_latch * 0.100) * (1.0 + 767.0e-6 * (temp_c - 46.0));
  endfunction
  function automatic real expected(int tm, int n_inv, int n_latch, real temp_c);
    return tm * 10.0 / (2.0 * period_ns(n_inv, n_latch, temp_c));
  endfunction

  // Run one measurement of all configurations: settle 4096, clear, window, stop.
  task automatic measure_all(input int tm);
    @(posedge clk); #1 en = 1'b1;
    repeat (4095) @(posedge clk);
    #1 clr = 1'b1;
    @(posedge clk); #1 clr = 1'b0;
    repeat (tm - 1) @(posedge clk);
    #1 en = 1'b0;
    repeat (8) @(posedge clk);
    #1;
  endtask

  task automatic measure_wide(input int tm);
    @(posedge clk); #1 en_w = 1'b1;
    repeat (4095) @(posedge clk);
    #1 clr_w = 1'b1;
    @(posedge clk); #1 clr_w = 1'b0;
    repeat (tm - 1) @(posedge clk);
    #1 en_w = 1'b0;
    repeat (8) @(posedge clk);
    #1;
  endtask

  localparam int TM_LIST [5] = '{8192, 65536, 131072, 262144, 2097152};

  initial begin
    int s40, s100;
    real e, res;
    // Part 1
    measure_all(65536);
    for (int c = 0; c < NCFG; c++) begin
      e = expected(65536, CFG_INV[c], CFG_LATCH[c], 46.0);
      check(real'(s[c]) > e - 2.0 && real'(s[c]) < e + 2.0,
            $sformatf("%0d inv + %0d latch: count %0d, expected %0.1f", CFG_INV[c], CFG_LATCH[c], s[c], e));
      if (c < 8) begin
        $display("%3d inverters: count %5d, published %5d", CFG_INV[c], s[c], PUB_COUNT[c]);
        check(s[c] > PUB_COUNT[c] * 0.9 && s[c] < PUB_COUNT[c] * 1.1,
              $sformatf("%0d inverters: count %0d far from published %0d", CFG_INV[c], s[c], PUB_COUNT[c]));
      end else if (c < 14) begin
        check(s[c] > s[c - 1] || c == 8, "fewer inverters and more latches did not shorten the ring");
      end
    end
    // Part 2: resolution of the 47-inverter ring (configuration 14)
    g_cfg[14].u_sensor.u_ro.temp_mc = 40_000;
    measure_all(65536);
    s40 = s[14];
    g_cfg[14].u_sensor.u_ro.temp_mc = 100_000;
    measure_all(65536);
    s100 = s[14];
    res = real'(s40 - s100) / 60.0;
    $display("47 inverters: %0d at 40 C, %0d at 100 C, resolution %0.3f counts/C (published 8.8124)", s40, s100, res);
    check(res > 8.8124 * 0.95 && res < 8.8124 * 1.05, $sformatf("resolution %0.3f", res));
    // Part 3: measurement periods
    foreach (TM_LIST[i]) begin
      measure_wide(TM_LIST[i]);
      e = expected(TM_LIST[i], 23, 24, 46.0);
      $display("t_m = %0d cycles: count %0d, quantization %0.4f %%", TM_LIST[i], s_w, 50.0 / real'(s_w));
      check(real'(s_w) > e - 2.0 && real'(s_w) < e + 2.0,
            $sformatf("t_m %0d: count %0d, expected %0.1f", TM_LIST[i], s_w, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
