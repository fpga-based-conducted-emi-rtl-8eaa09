// adc_driver_tb: self-checking test of the ADC read sequence.
//
// Two drivers run side by side: one on a working ADC model (BUSY for 40
// clocks) and one on a model that never raises BUSY. For random voltage codes
// the test checks the CONVST pulse length, that RD goes low only after BUSY
// has fallen (or after the timeout), the RD-low length, that Read Now follows
// RD rising by zero clocks, that the result equals the sampled code, and the
// total latency from start to Read Now. A start while busy is ignored.
module adc_driver_tb;
  import rmsdmd_pkg::*;

  localparam int T_CONVST = 2, T_RD = 3, T_TIMEOUT = 120, T_CONV = 40;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic        start;
  logic [15:0] vin;
  // working ADC
  logic convst_a, rd_n_a, busy_a, rn_a;
  logic [15:0] bus_a, data_a;
  int unsigned conv_a;
  // dead ADC
  logic convst_b, rd_n_b, busy_b, rn_b;
  logic [15:0] bus_b, data_b;
  int unsigned conv_b;

  adc_driver #(.T_CONVST(T_CONVST), .T_RD(T_RD), .T_TIMEOUT(T_TIMEOUT)) dut_a (
    .clk, .rst_n, .start, .adc_convst(convst_a), .adc_rd_n(rd_n_a),
    .adc_busy(busy_a), .adc_data(bus_a), .rn(rn_a), .data(data_a));
  adc_model #(.T_CONV(T_CONV)) adc_a (
    .clk, .convst(convst_a), .rd_n(rd_n_a), .vin_code(vin),
    .busy(busy_a), .data(bus_a), .conversions(conv_a));

  adc_driver #(.T_CONVST(T_CONVST), .T_RD(T_RD), .T_TIMEOUT(T_TIMEOUT)) dut_b (
    .clk, .rst_n, .start, .adc_convst(convst_b), .adc_rd_n(rd_n_b),
    .adc_busy(busy_b), .adc_data(bus_b), .rn(rn_b), .data(data_b));
  adc_model #(.T_CONV(T_CONV), .NO_BUSY(1'b1)) adc_b (
    .clk, .convst(convst_b), .rd_n(rd_n_b), .vin_code(vin),
    .busy(busy_b), .data(bus_b), .conversions(conv_b));

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-read trace of the working driver
  int t, t_conv_hi, t_conv_lo, t_busy_lo, t_rd_lo, t_rd_hi, t_rn;
  logic busy_q, rd_q, cv_q;
  always @(posedge clk) begin
    #1;
    t++;
    if (convst_a && !cv_q)  t_conv_hi = t;
    if (!convst_a && cv_q)  t_conv_lo = t;
    if (!busy_a && busy_q)  t_busy_lo = t;
    if (!rd_n_a && rd_q)    t_rd_lo = t;
    if (rd_n_a && !rd_q)    t_rd_hi = t;
    if (rn_a)               t_rn = t;
    check(!(convst_a && !rd_n_a) && !(convst_b && !rd_n_b), "CONVST and RD active together");
    cv_q = convst_a; busy_q = busy_a; rd_q = rd_n_a;
  end

  initial begin
    start = 0; vin = 0; t = 0; cv_q = 0; busy_q = 0; rd_q = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      int t0;
      int unsigned cb;
      logic [15:0] v;
      v = 16'($urandom);
      @(negedge clk);
      vin = v; start = 1; t0 = t + 1;
      cb = conv_b;
      @(negedge clk);
      start = 0;
      @(negedge clk);
      vin = 16'($urandom);            // input moves after sampling
      // a second start during the read must be ignored
      repeat (10) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      // wait for both Read Now strobes
      fork
        begin wait (rn_a); end
        begin wait (rn_b); end
      join
      @(negedge clk);
      check(data_a == v, $sformatf("working ADC result %h expected %h", data_a, v));
      check(data_b == v, "dead-ADC driver read after timeout");
      check(t_conv_lo - t_conv_hi == T_CONVST, "CONVST pulse length");
      check(t_rd_lo >= t_busy_lo && t_rd_lo - t_busy_lo <= 1, "RD low right after BUSY falls");
      check(t_rd_hi - t_rd_lo == T_RD, "RD low length");
      check(t_rn == t_rd_hi, "Read Now with RD rising");
      check(t_rn - t0 == T_CONVST + T_CONV + T_RD,
            $sformatf("start-to-Read-Now latency %0d", t_rn - t0));
      check(conv_a == unsigned'(r + 1), $sformatf("one conversion per start: %0d after %0d", conv_a, r + 1));
      check(conv_b == cb + 1, "dead ADC also converted once");
      // dead ADC: driver must still finish through its timeout, reading 0s
      // are not guaranteed, but the read must come after the timeout
      repeat (T_TIMEOUT + 20) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // timeout path of the dead-ADC driver: RD must not go low before
  // T_CONVST + T_TIMEOUT clocks after CONVST rose
  int tb_cv, tb_rdlo;
  logic cvb_q = 0, rdb_q = 1;
  always @(posedge clk) begin
    #2;
    if (convst_b && !cvb_q) tb_cv = t;
    if (!rd_n_b && rdb_q) begin
      tb_rdlo = t;
      check(tb_rdlo - tb_cv == T_TIMEOUT + 1, $sformatf("timeout read after %0d", tb_rdlo - tb_cv));
    end
    cvb_q = convst_b; rdb_q = rd_n_b;
  end
endmodule
