// rmsdmd_spectrum_tb: conducted-noise spectrum of the converter input current
// under each randomization scheme, at default parameters.
//
// The controller regulates the same averaged buck model as rmsdmd_top_tb
// (12 V to 5 V, 33 uH, 100 uF, 2.5 ohm). After settling, the input current
// i_in = gate * i_L is recorded and its power spectrum estimated like a
// spectrum analyzer with 40 kHz resolution bandwidth: Hann-windowed DFTs of
// 1250 samples (25 us), averaged over 80 windows, evaluated at every 40 kHz
// bin from 160 kHz to 30 MHz. For each scheme the test reports the highest
// line over the band and the highest line within +-280 kHz of 5, 10 and
// 15 MHz, and checks:
//   - at 5, 10 and 15 MHz the schemes with frequency randomization are at
//     least 3 dB below plain PWM, and duty-only randomization at least
//     0.5 dB below;
//   - no randomized scheme raises the highest line of the band by more
//     than 0.5 dB;
//   - the output stays regulated within 1 % while measuring.
module rmsdmd_spectrum_tb;
  import rmsdmd_pkg::*;

  localparam real VIN = 12.0, L = 33e-6, C = 100e-6, RLOAD = 2.5, DT = 20e-9;
  localparam int  NWIN = 1250;      // 25 us at 50 MHz -> 40 kHz bins
  localparam int  KLO = 4, KHI = 750;
  localparam int  NAVG = 80;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  rand_mode_t mode;
  duty_t      rand_level;
  adc_code_t  adc_data;
  logic       adc_convst, adc_rd_n, adc_busy, gate, cycle_start, frozen;
  duty_t      duty_cmd, duty_k;
  logic [15:0] sn, dr, ds;
  int unsigned conversions;

  rmsdmd_top dut (
    .clk, .rst_n, .mode, .rand_level, .vref(16'd27307), .dead_zone(16'd20),
    .adc_convst, .adc_rd_n, .adc_busy, .adc_data,
    .gate, .cycle_start, .duty_cmd, .duty_k, .frozen, .sn, .dr, .ds);

  real il = 0.0, vo = 0.0;
  logic [15:0] vcode;
  always @(posedge clk) begin
    real vsw;
    vsw = gate ? VIN : 0.0;
    il  = il + (vsw - vo) / L * DT;
    vo  = vo + (il - vo / RLOAD) / C * DT;
  end
  always_comb begin
    real c;
    c = vo / 12.0 * 65536.0;
    if (c < 0.0) c = 0.0;
    if (c > 65535.0) c = 65535.0;
    vcode = 16'($rtoi(c));
  end

  adc_model #(.T_CONV(40)) u_adc (
    .clk, .convst(adc_convst), .rd_n(adc_rd_n), .vin_code(vcode),
    .busy(adc_busy), .data(adc_data), .conversions(conversions));

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real cos_t[NWIN], sin_t[NWIN], hann[NWIN], x[NWIN];
  real pw[KHI + 1];

  // settle for n clocks, then measure; returns the highest line in dB
  task automatic measure(input string name, input rand_mode_t m, input duty_t r,
                         input int settle, output real peak_db, output real at_mhz[3]);
    real vsum, fpeak;
    int  vcnt;
    mode = m; rand_level = r;
    repeat (settle) @(posedge clk);
    for (int k = 0; k <= KHI; k++) pw[k] = 0.0;
    vsum = 0.0; vcnt = 0;
    for (int w = 0; w < NAVG; w++) begin
      for (int n = 0; n < NWIN; n++) begin
        @(negedge clk);
        x[n] = (gate ? il : 0.0) * hann[n];
        vsum += vo; vcnt++;
      end
      for (int k = KLO; k <= KHI; k++) begin
        real re, im;
        re = 0.0; im = 0.0;
        for (int n = 0; n < NWIN; n++) begin
          int idx;
          idx = (k * n) % NWIN;
          re += x[n] * cos_t[idx];
          im -= x[n] * sin_t[idx];
        end
        pw[k] += (re * re + im * im) / NAVG;
      end
    end
    peak_db = -1000.0; fpeak = 0.0;
    for (int k = KLO; k <= KHI; k++) begin
      real db;
      db = 10.0 * $log10(pw[k] + 1e-30);
      if (db > peak_db) begin peak_db = db; fpeak = k * 40.0e3; end
    end
    for (int j = 0; j < 3; j++) begin
      int kc;
      kc = 125 * (j + 1);
      at_mhz[j] = -1000.0;
      for (int k = kc - 7; k <= kc + 7; k++)
        if (10.0 * $log10(pw[k] + 1e-30) > at_mhz[j]) at_mhz[j] = 10.0 * $log10(pw[k] + 1e-30);
    end
    $display("scheme %-22s: highest line %6.2f dB at %5.2f MHz; at 5/10/15 MHz %6.2f %6.2f %6.2f dB; mean Vout %f V",
             name, peak_db, fpeak / 1e6, at_mhz[0], at_mhz[1], at_mhz[2], vsum / vcnt);
    check(vsum / vcnt > 4.95 && vsum / vcnt < 5.05, $sformatf("%s: output regulated", name));
  endtask

  initial begin
    real pa, pb, pc, pd;
    real fa[3], fb[3], fc[3], fd[3];
    for (int n = 0; n < NWIN; n++) begin
      cos_t[n] = $cos(2.0 * PI * n / NWIN);
      sin_t[n] = $sin(2.0 * PI * n / NWIN);
      hann[n]  = 0.5 - 0.5 * $cos(2.0 * PI * n / NWIN);
    end
    mode = '0; rand_level = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    measure("PWM",                   '{1'b0, 1'b0, 1'b0}, 16'd0,    500_000, pa, fa);
    measure("random duty (main)",    RAND_MODE_MAIN,      16'd6554, 150_000, pb, fb);
    measure("random duty+frequency", '{1'b1, 1'b1, 1'b0}, 16'd6554, 150_000, pc, fc);
    measure("random duty+freq+pos",  '{1'b1, 1'b1, 1'b1}, 16'd6554, 150_000, pd, fd);
    $display("highest-line change against PWM: duty %.2f dB, duty+freq %.2f dB, all %.2f dB",
             pb - pa, pc - pa, pd - pa);
    for (int j = 0; j < 3; j++) begin
      $display("at %0d MHz against PWM: duty %.2f dB, duty+freq %.2f dB, all %.2f dB",
               5 * (j + 1), fb[j] - fa[j], fc[j] - fa[j], fd[j] - fa[j]);
      check(fb[j] < fa[j] - 0.5, $sformatf("duty randomization lowers the %0d MHz line", 5 * (j + 1)));
      check(fc[j] < fa[j] - 3.0, $sformatf("duty+frequency randomization lowers the %0d MHz line", 5 * (j + 1)));
      check(fd[j] < fa[j] - 3.0, $sformatf("full randomization lowers the %0d MHz line", 5 * (j + 1)));
    end
    check(pb < pa + 0.5 && pc < pa + 0.5 && pd < pa + 0.5, "no scheme raises the highest line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
