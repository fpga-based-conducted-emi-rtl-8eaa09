// lfsr_prng: stream-based pseudorandom generator.
//
// Three maximal-length Fibonacci LFSRs run in parallel, each loaded with its
// own seed at reset. On every enabled clock each register shifts left by one
// and the XOR of its taps is fed back into the LSB. The three register states
// are the three random streams; a consumer samples them at the start of a
// switching cycle and reads them as integers. The parallel structure, the
// distinct seeds and the XOR-to-LSB feedback follow the published design description;
// the 16-bit length, the tap set (x^16+x^15+x^13+x^4+1) and the seed values are
// this design's choices. A zero seed is replaced by 1, since the all-zero
// state would lock the register.
//
// Interface: en advances all three registers; rnd[i] is register i, valid one
// clock after reset and updated every enabled clock.
module lfsr_prng #(
  parameter int unsigned W = 16,
  parameter logic [W-1:0] TAPS = 16'hD008,   // bits 15,14,12,3
  parameter logic [W-1:0] SEED0 = 16'hACE1,
  parameter logic [W-1:0] SEED1 = 16'h1D87,
  parameter logic [W-1:0] SEED2 = 16'h7F3B
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] rnd [3]
);

  logic [W-1:0] seeds [3];
  assign seeds[0] = (SEED0 == '0) ? W'(1) : SEED0;
  assign seeds[1] = (SEED1 == '0) ? W'(1) : SEED1;
  assign seeds[2] = (SEED2 == '0) ? W'(1) : SEED2;

  for (genvar i = 0; i < 3; i++) begin : g_lfsr
    logic [W-1:0] state;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  state <= seeds[i];
      else if (en) state <= {state[W-2:0], ^(state & TAPS)};
    end
    assign rnd[i] = state;
  end

endmodule
