// cic_decimator_tb: self-checking test of the comb decimation filter.
//
// Two filters are tested, the default (K=4, N=8, D=1) and one with K=3, N=4,
// D=2. Random samples in [-7, 8] are fed with random gaps in in_valid. The
// reference is a direct FIR: the impulse response of ((1 - z^-ND)/(1 - z^-1))^K
// is built by K-fold convolution of a length-N*D box, and each output is
// the dot product of that response with the input history. The test also
// checks that an output appears after exactly every N-th accepted sample.
module cic_decimator_tb;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic in_valid = 0;
  logic signed [4:0] in = 0;
  logic ov_a, ov_b;
  logic signed [16:0] out_a;
  logic signed [13:0] out_b;   // 5 + 3*clog2(4*2)

  cic_decimator #(.K(4), .N(8), .D(1), .IN_W(5)) dut_a (
    .clk, .rst_n, .in_valid, .in, .out_valid(ov_a), .out(out_a));
  cic_decimator #(.K(3), .N(4), .D(2), .IN_W(5)) dut_b (
    .clk, .rst_n, .in_valid, .in, .out_valid(ov_b), .out(out_b));

  // impulse response of a CIC of order k and box length l
  function automatic void cic_h(input int k, input int l, output int h[$]);
    int box[$], tmp[$];
    h = '{1};
    for (int s = 0; s < k; s++) begin
      tmp = {};
      for (int i = 0; i < h.size() + l - 1; i++) tmp.push_back(0);
      for (int i = 0; i < h.size(); i++)
        for (int j = 0; j < l; j++) tmp[i + j] += h[i];
      h = tmp;
    end
  endfunction

  int xs[$];
  int ha[$], hb[$];

  function automatic int fir(input int h[$], input int last);
    int acc = 0;
    for (int j = 0; j < h.size(); j++)
      if (last - j >= 0) acc += h[j] * xs[last - j];
    return acc;
  endfunction

  int outs_a = 0, outs_b = 0;

  initial begin
    cic_h(4, 8, ha);
    cic_h(3, 8, hb);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      bit v;
      @(negedge clk);
      v = ($urandom_range(0, 4) != 0);
      in_valid = v;
      in = 5'($signed($urandom_range(0, 15)) - 7);
      if (v) xs.push_back(int'(in));
      @(posedge clk);
      #1;
      if (v) begin
        int n;
        n = xs.size();
        check(ov_a == (n % 8 == 0), $sformatf("filter A output timing at sample %0d", n));
        check(ov_b == (n % 4 == 0), $sformatf("filter B output timing at sample %0d", n));
        if (ov_a) begin
          check(int'(out_a) == fir(ha, n - 1), $sformatf("A: %0d expected %0d", out_a, fir(ha, n - 1)));
          outs_a++;
        end
        if (ov_b) begin
          check(int'(out_b) == fir(hb, n - 1), $sformatf("B: %0d expected %0d", out_b, fir(hb, n - 1)));
          outs_b++;
        end
      end else begin
        check(!ov_a && !ov_b, "no output without a sample");
      end
    end
    check(outs_a > 300 && outs_b > 600, "enough outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
