// mash211: fourth-order 2-1-1 MASH digital sigma-delta modulator with dither.
//
// The modulator turns a 16-bit duty fraction x (value x/2^W) into a stream of
// small signed integers y whose mean is exactly x/2^W and whose quantization
// error is shaped by (1 - z^-1)^4, as in the 2-1-1 MASH cascade:
//   stage 1, second order (error feedback): v = x + 2*e1[n-1] - e1[n-2],
//            y1 = floor(v / 2^W), e1 = v mod 2^W
//   stage 2, first order: accumulator of e1, carry c2, residue e2
//   stage 3, first order: accumulator of e2, carry c3, residue e3
//   y = y1 + (1-z^-1)^2 c2 + (1-z^-1)^3 c3
// so that Y = X/2^W - (1-z^-1)^4 E3/2^W (all inter-stage gains g_i = 1).
// The random part of the modulator is a signed dither added to x before
// stage 1 (the sum is clamped to [0, 2^W-1]).
//
// The stage structure and the noise transfer follow the published design; the error
// feedback form of stage 1, the 2^W quantizer step and the dither input are
// this design's choices. The published z^-4 signal delay is not reproduced:
// here the signal delay is one register (y is registered).
//
// Interface: one sample per clock with en high; y is valid the clock after.
// y lies in [-7, 8].
module mash211 #(
  parameter int unsigned W   = 16,  // input fraction width
  parameter int unsigned DW  = 16,  // dither width (signed)
  parameter int unsigned YW  = 5    // output width (signed)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [W-1:0]         x,
  input  logic signed [DW-1:0] dither,
  output logic signed [YW-1:0] y
);

  localparam int unsigned VW = W + 3;  // width of stage-1 sum (signed)

  // dithered input, clamped
  logic signed [VW-1:0] xd_full;
  logic [W-1:0]         xd;
  always_comb begin
    xd_full = signed'(VW'({1'b0, x})) + VW'(dither);
    if (xd_full < 0)                              xd = '0;
    else if (xd_full > signed'(VW'({W{1'b1}})))   xd = '1;
    else                                          xd = xd_full[W-1:0];
  end

  // state
  logic [W-1:0] e1_d1, e1_d2, acc2, acc3;
  logic         c2_d1, c2_d2, c3_d1, c3_d2, c3_d3;

  // stage 1: second-order error feedback quantizer
  logic signed [VW-1:0] v;
  logic signed [2:0]    y1;   // -1 .. 2
  logic [W-1:0]         e1;
  // stages 2 and 3: first-order accumulators
  logic [W:0]           s2, s3;
  logic                 c2, c3;
  logic [W-1:0]         e2;
  logic signed [YW-1:0] y_next;

  always_comb begin
    v  = signed'(VW'(xd)) + (signed'(VW'(e1_d1)) <<< 1) - signed'(VW'(e1_d2));
    y1 = 3'(v >>> W);
    e1 = v[W-1:0];
    s2 = {1'b0, acc2} + {1'b0, e1};
    c2 = s2[W];
    e2 = s2[W-1:0];
    s3 = {1'b0, acc3} + {1'b0, e2};
    c3 = s3[W];
    y_next = YW'(y1)
           + YW'(c2) - (YW'(c2_d1) <<< 1) + YW'(c2_d2)
           + YW'(c3) - YW'(3 * c3_d1) + YW'(3 * c3_d2) - YW'(c3_d3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1_d1 <= '0; e1_d2 <= '0; acc2 <= '0; acc3 <= '0;
      c2_d1 <= 1'b0; c2_d2 <= 1'b0;
      c3_d1 <= 1'b0; c3_d2 <= 1'b0; c3_d3 <= 1'b0;
      y <= '0;
    end else if (en) begin
      e1_d1 <= e1;   e1_d2 <= e1_d1;
      acc2  <= e2;   acc3  <= s3[W-1:0];
      c2_d1 <= c2;   c2_d2 <= c2_d1;
      c3_d1 <= c3;   c3_d2 <= c3_d1;  c3_d3 <= c3_d2;
      y     <= y_next;
    end
  end

endmodule
