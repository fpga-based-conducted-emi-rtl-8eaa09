// cic_decimator: comb (CIC) decimation filter H(z) = ((1 - z^-ND)/(1 - z^-1))^K.
//
// Hogenauer structure: K integrators run at the input rate, a counter keeps
// every N-th integrator value, and K comb sections (each y = u - u delayed by
// D output samples) run at the output rate. The DC gain is (N*D)^K, so the
// registers carry IN_W + K*clog2(N*D) bits and wrap in two's complement, which
// the combs undo. The transfer function and its parameters K, N and D follow
// the published design; their values (K = 4, N = 8, D = 1) and the widths are this
// design's choices.
//
// Interface: in_valid marks an input sample. out_valid pulses for one clock
// after every N-th sample, one clock after that sample, with out holding the
// filtered value whose newest input is that sample.
module cic_decimator #(
  parameter int unsigned K    = 4,   // filter order
  parameter int unsigned N    = 8,   // decimation ratio
  parameter int unsigned D    = 1,   // differential delay
  parameter int unsigned IN_W = 5,   // signed input width
  parameter int unsigned OUT_W = IN_W + K * $clog2(N * D)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out
);

  typedef logic signed [OUT_W-1:0] acc_t;

  acc_t integ [K];          // integrator registers
  acc_t integ_next [K];
  acc_t comb_dly [K][D];    // comb delay lines, output rate
  acc_t comb_val [K+1];
  logic [$clog2(N+1)-1:0] phase;
  logic dec_tick;

  always_comb begin
    integ_next[0] = integ[0] + acc_t'(in);
    for (int i = 1; i < K; i++) integ_next[i] = integ[i] + integ_next[i-1];
  end

  assign dec_tick = in_valid && (phase == ($clog2(N+1))'(N - 1));

  always_comb begin
    comb_val[0] = integ_next[K-1];
    for (int i = 0; i < K; i++) comb_val[i+1] = comb_val[i] - comb_dly[i][D-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        integ[i] <= '0;
        for (int j = 0; j < D; j++) comb_dly[i][j] <= '0;
      end
      phase     <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int i = 0; i < K; i++) integ[i] <= integ_next[i];
        phase <= dec_tick ? '0 : phase + 1'b1;
      end
      if (dec_tick) begin
        for (int i = 0; i < K; i++) begin
          comb_dly[i][0] <= comb_val[i];
          for (int j = 1; j < D; j++) comb_dly[i][j] <= comb_dly[i][j-1];
        end
        out       <= comb_val[K];
        out_valid <= 1'b1;
      end
    end
  end

endmodule
