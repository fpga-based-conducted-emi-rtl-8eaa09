// rand_dpwm_tb: self-checking test of the randomized DPWM.
//
// Inputs (duty, IN_f, IN_p and the two mode bits) are changed at the start
// of every switching cycle and held through it. For every cycle the test
// measures its length in clocks, the number of gate-high clocks, the offset
// of the first gate-high clock and whether the pulse is contiguous, and
// compares them with values computed from the equations
//   SN = floor(50e6 / Fsw), Fsw = 270000 + 1000 * IN_f (or 300000),
//   DR = floor(SN * d / 2^16), DS = floor((SN - DR) * IN_p / 64) (or 0),
// applying the frequency drawn in cycle k to cycle k+2 and the duty and
// position drawn in cycle k to cycle k+1. All four mode combinations and the
// duty extremes 0 and 1 - 2^-16 are used.
module rand_dpwm_tb;
  import rmsdmd_pkg::*;

  localparam int FCLK = 50_000_000, FC = 300_000, FL = 270_000, J = 1_000;
  localparam int NCYC = 600;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rand_freq = 0, rand_pos = 0;
  duty_t duty = 0;
  logic [5:0] in_f = 0, in_p = 0;
  logic cycle_start, gate;
  logic [15:0] sn, dr, ds;

  rand_dpwm dut (.clk, .rst_n, .rand_freq, .rand_pos, .duty, .in_f, .in_p,
                 .cycle_start, .gate, .sn, .dr, .ds);

  initial begin
    repeat (NCYC * 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_sn[NCYC + 3], exp_dr[NCYC + 3], exp_ds[NCYC + 3];
  int len, on, first_on, edges;
  bit gate_q;
  int n_freq_var = 0, n_pos_var = 0, n_full = 0, n_zero = 0;

  initial begin
    int k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_sn[0] = FCLK / FC; exp_sn[1] = FCLK / FC;
    exp_dr[0] = 0; exp_ds[0] = 0;
    k = 0;
    len = 0; on = 0; first_on = -1; edges = 0; gate_q = 0;
    forever begin
      // sample the state of this clock
      if (cycle_start) begin
        if (k > 0) begin
          int c;
          c = k - 1;
          check(len == exp_sn[c], $sformatf("cycle %0d length %0d expected %0d", c, len, exp_sn[c]));
          check(on == exp_dr[c], $sformatf("cycle %0d on-time %0d expected %0d", c, on, exp_dr[c]));
          if (exp_dr[c] > 0)
            check(first_on == exp_ds[c], $sformatf("cycle %0d delay %0d expected %0d", c, first_on, exp_ds[c]));
          check(edges <= 1, "one pulse per cycle");
          if (exp_sn[c] != FCLK / FC) n_freq_var++;
          if (exp_ds[c] > 0) n_pos_var++;
        end
        if (k == NCYC) break;
        // new inputs for this cycle
        if (k % 50 == 0) begin
          rand_freq = k[6];
          rand_pos  = k[7] ^ k[6];
        end
        case ($urandom_range(0, 9))
          0: duty = 16'd0;
          1: duty = 16'hFFFF;
          default: duty = 16'($urandom);
        endcase
        in_f = 6'($urandom);
        in_p = 6'($urandom);
        exp_sn[k + 2] = rand_freq ? FCLK / (FL + J * int'(in_f)) : FCLK / FC;
        exp_dr[k + 1] = int'((longint'(exp_sn[k + 1]) * longint'(duty)) >>> 16);
        exp_ds[k + 1] = rand_pos ? ((exp_sn[k + 1] - exp_dr[k + 1]) * int'(in_p)) >>> 6 : 0;
        if (duty == 16'hFFFF) n_full++;
        if (duty == 0) n_zero++;
        len = 0; on = 0; first_on = -1; edges = 0; gate_q = 0;
      end
      check(sn == 16'(exp_sn[k]) || !cycle_start, "sn output");
      if (gate) begin
        if (first_on < 0) first_on = len;
        if (!gate_q) edges++;
        on++;
      end
      gate_q = gate;
      len++;
      if (cycle_start) k++;
      @(negedge clk);
    end
    check(n_freq_var > 50 && n_pos_var > 50 && n_full > 0 && n_zero > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
