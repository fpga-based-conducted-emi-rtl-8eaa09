// rmsdmd_top_tb: closed-loop test of the whole controller at its default
// parameters (50 MHz clock, 300 kHz centre frequency).
//
// The controller drives an averaged-switch model of a synchronous buck
// converter (Vin = 12 V, L = 33 uH, C = 100 uF, 2.5 ohm load, i.e. 5 V / 2 A),
// integrated with forward Euler every 20 ns clock, and reads its output
// through the ADC model with a 12 V full scale, so 5 V is code 27307. The
// test runs four phases of 10 ms each:
//   A  plain (no randomization)          B  randomized duty (main scheme)
//   C  randomized duty and frequency     D  duty, frequency and position
// In the last quarter of every phase the mean output must be within 0.5 % of
// 5 V. Throughout, each switching cycle must have SN clocks and DR gate-high
// clocks as reported by the DPWM, the cycle length must stay within the
// frequency range, and the randomized duty must stay within R/2 (plus
// filter margin) of the compensator duty and average to it. Each mechanism
// (ADC read per cycle, dead-zone freeze, duty dither, frequency change,
// pulse delay, compensator update) is counted and must occur.
module rmsdmd_top_tb;
  import rmsdmd_pkg::*;

  localparam real VIN = 12.0, L = 33e-6, C = 100e-6, RLOAD = 2.5, DT = 20e-9;
  localparam real VFS = 12.0;
  localparam int  PHASE_CLKS = 500_000;   // 10 ms
  localparam int  VREF_CODE = 27307;      // 5 V

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
  adc_code_t  vref, dead_zone, adc_data;
  logic       adc_convst, adc_rd_n, adc_busy, gate, cycle_start, frozen;
  duty_t      duty_cmd, duty_k;
  logic [15:0] sn, dr, ds;
  int unsigned conversions;

  rmsdmd_top dut (
    .clk, .rst_n, .mode, .rand_level, .vref, .dead_zone,
    .adc_convst, .adc_rd_n, .adc_busy, .adc_data,
    .gate, .cycle_start, .duty_cmd, .duty_k, .frozen, .sn, .dr, .ds);

  // plant
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
    c = vo / VFS * 65536.0;
    if (c < 0.0) c = 0.0;
    if (c > 65535.0) c = 65535.0;
    vcode = 16'($rtoi(c));
  end

  adc_model #(.T_CONV(40)) u_adc (
    .clk, .convst(adc_convst), .rd_n(adc_rd_n), .vin_code(vcode),
    .busy(adc_busy), .data(adc_data), .conversions(conversions));

  initial begin
    repeat (5 * PHASE_CLKS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_cycles = 0, n_reads = 0, n_frozen = 0, n_updates = 0;
  int n_dither = 0, n_freq = 0, n_pos = 0;
  logic frozen_q = 0;
  duty_t duty_cmd_q = 0;

  // per-cycle gate accounting (sampled mid-clock)
  int len = 0, on = 0, cyc_sn = 0, cyc_dr = 0;
  bit measuring = 0;
  int phase_i = 0;
  real vsum = 0.0; int vcnt = 0;
  longint dk_sum = 0, dc_sum = 0; int dk_cnt = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (cycle_start) begin
        if (measuring) begin
          check(len == cyc_sn, $sformatf("cycle length %0d, DPWM reported %0d", len, cyc_sn));
          check(on == cyc_dr, $sformatf("gate-high clocks %0d, DPWM reported %0d", on, cyc_dr));
          n_cycles++;
        end
        measuring = 1;
        len = 0; on = 0; cyc_sn = int'(sn); cyc_dr = int'(dr);
        check(sn >= 16'd150 && sn <= 16'd185, $sformatf("cycle length %0d out of range", sn));
        if (sn != 16'd166) n_freq++;
        if (ds != 0) n_pos++;
        // randomized duty against the compensator duty
        begin
          int diff;
          diff = int'(duty_k) - int'(duty_cmd);
          check((diff < 0 ? -diff : diff) <= int'(rand_level) / 2 + 1200,
                $sformatf("duty_k %0d too far from duty %0d", duty_k, duty_cmd));
          if ((diff < 0 ? -diff : diff) > 256) n_dither++;
          dk_sum += longint'(duty_k); dc_sum += longint'(duty_cmd); dk_cnt++;
        end
      end
      if (gate) on++;
      len++;
      if (dut.rn) n_reads++;
      if (frozen && !frozen_q) n_frozen++;
      if (duty_cmd != duty_cmd_q) n_updates++;
      frozen_q = frozen;
      duty_cmd_q = duty_cmd;
    end
  end

  task automatic run_phase(input string name, input rand_mode_t m, input duty_t r);
    mode = m; rand_level = r;
    vsum = 0.0; vcnt = 0; dk_sum = 0; dc_sum = 0; dk_cnt = 0;
    for (int i = 0; i < PHASE_CLKS; i++) begin
      @(posedge clk);
      if (i >= PHASE_CLKS * 3 / 4) begin
        vsum += vo; vcnt++;
      end
      if (i == PHASE_CLKS / 2) begin
        dk_sum = 0; dc_sum = 0; dk_cnt = 0;
      end
    end
    begin
      real vmean, dmean;
      vmean = vsum / vcnt;
      dmean = (real'(dk_sum) - real'(dc_sum)) / dk_cnt;
      $display("phase %s: mean Vout %f V, mean duty_k - duty %f LSB over %0d cycles",
               name, vmean, dmean, dk_cnt);
      check(vmean > 4.975 && vmean < 5.025, $sformatf("phase %s: mean output %f V", name, vmean));
      check(dmean < 400.0 && dmean > -400.0, $sformatf("phase %s: duty bias %f", name, dmean));
    end
  endtask

  initial begin
    mode = '0; rand_level = '0; vref = 16'(VREF_CODE); dead_zone = 16'd20;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_phase("A", '{rand_freq: 1'b0, rand_duty: 1'b0, rand_pos: 1'b0}, 16'd0);
    run_phase("B", RAND_MODE_MAIN, 16'd6554);
    run_phase("C", '{rand_freq: 1'b1, rand_duty: 1'b1, rand_pos: 1'b0}, 16'd6554);
    run_phase("D", '{rand_freq: 1'b1, rand_duty: 1'b1, rand_pos: 1'b1}, 16'd6554);
    $display("cycles %0d, ADC reads %0d, compensator updates %0d, freezes %0d, dithered cycles %0d, frequency changes %0d, delayed pulses %0d",
             n_cycles, n_reads, n_updates, n_frozen, n_dither, n_freq, n_pos);
    check(n_reads >= n_cycles - 1 && n_reads <= n_cycles + 1, "one ADC read per switching cycle");
    check(n_frozen > 0, "dead-zone freeze happened");
    check(n_updates > 0, "compensator updated");
    check(n_dither > 100, "duty randomization happened");
    check(n_freq > 100, "frequency randomization happened");
    check(n_pos > 100, "pulse-position randomization happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
