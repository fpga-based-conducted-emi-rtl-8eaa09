// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// start loads dividend and divisor; NW clocks later done pulses for one clock
// with quot = floor(dividend / divisor) (truncated to QW bits). Used by the
// randomized DPWM to turn a switching frequency into a clock count. A zero
// divisor gives an all-ones quotient.
module seq_divider #(
  parameter int unsigned NW = 32,   // dividend width
  parameter int unsigned DW = 24,   // divisor width
  parameter int unsigned QW = 16    // quotient width kept
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [QW-1:0] quot
);

  logic [NW-1:0]      q;        // dividend shifting out, quotient shifting in
  logic [DW-1:0]      rem;
  logic [DW-1:0]      dvs;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]        trial;
  logic [DW+1:0]      diff;

  always_comb begin
    trial = {rem[DW-1:0], q[NW-1]};
    diff  = {1'b0, trial} - {2'b00, dvs};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; rem <= '0; dvs <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; quot <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q <= dividend; rem <= '0; dvs <= divisor;
        cnt <= ($clog2(NW+1))'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        if (!diff[DW+1]) begin
          rem <= diff[DW-1:0];
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= trial[DW-1:0];
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= (q[NW-2:QW-1] != '0) ? '1
                : {q[QW-2:0], ~diff[DW+1]};
        end
      end
    end
  end

endmodule
