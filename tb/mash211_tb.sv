// mash211_tb: self-checking test of the 2-1-1 MASH modulator.
//
// The check does not re-implement the modulator. It uses two properties a
// correct fourth-order MASH must have. Let d[n] = 2^16 * y[n+1] - xd[n],
// where xd is the dithered, clamped input and y is one clock late. A fourth-
// order noise transfer (1 - z^-1)^4 makes d the fourth difference of a
// bounded residue, so its running sums of order 1, 2, 3 and 4 all stay
// bounded (by 8, 4, 2 and 1 times 2^16). A lower-order or miswired modulator
// lets at least one of them grow. Output range [-7, 8] is checked as well,
// over constant, slowly varying and random inputs, with and without dither
// and with the clamp at both ends.
module mash211_tb;
  localparam longint M = 65536;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] x = 0;
  logic signed [15:0] dither = 0;
  logic signed [4:0] y;
  mash211 dut (.clk, .rst_n, .en(1'b1), .x, .dither, .y);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint s1, s2, s3, s4, m1, m2, m3, m4;
  int ymin, ymax;

  task automatic run(input int mode, input int n);
    // restart the modulator so that every run begins from zero state
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    s1 = 0; s2 = 0; s3 = 0; s4 = 0; m1 = 0; m2 = 0; m3 = 0; m4 = 0;
    for (int i = 0; i < n; i++) begin
      longint xd;
      unique case (mode)
        0: begin x = 16'd21845; dither = 0; end                      // 1/3
        1: begin x = 16'd3;     dither = 0; end                      // tiny
        2: begin x = 16'(($urandom) & 16'hFFFF); dither = 0; end     // random
        3: begin x = 16'(32768 + 20000 * $sin(6.283 * i / 997.0)); dither = 0; end
        4: begin x = 16'd40000; dither = 16'($signed($urandom_range(0, 4000)) - 2000); end
        5: begin x = 16'd65500; dither = 16'sd2000; end                // clamps high
        default: begin x = 16'd30; dither = -16'sd2000; end          // clamps low
      endcase
      xd = longint'(x) + longint'(dither);
      if (xd < 0) xd = 0;
      if (xd > M - 1) xd = M - 1;
      @(posedge clk);
      #1;
      begin
        longint d;
        d = M * longint'(y) - xd;
        s1 += d; s2 += s1; s3 += s2; s4 += s3;
        if ((s1 < 0 ? -s1 : s1) > m1) m1 = (s1 < 0 ? -s1 : s1);
        if ((s2 < 0 ? -s2 : s2) > m2) m2 = (s2 < 0 ? -s2 : s2);
        if ((s3 < 0 ? -s3 : s3) > m3) m3 = (s3 < 0 ? -s3 : s3);
        if ((s4 < 0 ? -s4 : s4) > m4) m4 = (s4 < 0 ? -s4 : s4);
        if (y < ymin) ymin = y;
        if (y > ymax) ymax = y;
      end
      @(negedge clk);
    end
    check(m1 <= 8 * M, $sformatf("mode %0d: first sum %0d", mode, m1));
    check(m2 <= 4 * M, $sformatf("mode %0d: second sum %0d", mode, m2));
    check(m3 <= 2 * M, $sformatf("mode %0d: third sum %0d", mode, m3));
    check(m4 <= 1 * M, $sformatf("mode %0d: fourth sum %0d", mode, m4));
  endtask

  initial begin
    ymin = 100; ymax = -100;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 7; mode++) run(mode, 5000);
    check(ymin >= -7 && ymax <= 8, $sformatf("output range %0d..%0d", ymin, ymax));
    check(ymin < 0 && ymax > 1, "multi-level output used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
