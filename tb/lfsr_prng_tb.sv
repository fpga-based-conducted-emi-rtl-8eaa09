// lfsr_prng_tb: self-checking test of the three-stream LFSR generator.
//
// Each stream is compared clock by clock with a reference that applies the
// recurrence s[n+16] = s[n+15] ^ s[n+14] ^ s[n+12] ^ s[n+3] (feedback into
// the LSB) to a bit history started from the seed. The enable is toggled at
// random. Stream 0 must return to its seed after exactly 2^16 - 1 steps and
// not before (maximal length), and the three streams must differ.
module lfsr_prng_tb;
  localparam logic [15:0] SEEDS [3] = '{16'hACE1, 16'h1D87, 16'h7F3B};

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic en = 0;
  logic [15:0] rnd [3];
  lfsr_prng dut (.clk, .rst_n, .en, .rnd);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] ref_s [3];
  function automatic logic [15:0] step(input logic [15:0] s);
    // bit numbering 1..16 in the polynomial maps to s[0..15]
    return {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  endfunction

  initial begin
    int steps;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) ref_s[k] = SEEDS[k];
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++)
        check(rnd[k] == ref_s[k], $sformatf("stream %0d: %h expected %h", k, rnd[k], ref_s[k]));
      check(rnd[0] != rnd[1] && rnd[1] != rnd[2] && rnd[0] != rnd[2], "streams differ");
      en = $urandom_range(0, 1);
      if (en) for (int k = 0; k < 3; k++) ref_s[k] = step(ref_s[k]);
    end
    // period of stream 0
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    en = 1;
    steps = 0;
    do begin
      @(negedge clk);
      steps++;
    end while (rnd[0] != SEEDS[0] && steps < 70000);
    check(steps == 65535, $sformatf("period %0d", steps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
