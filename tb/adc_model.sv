// adc_model: behavioural model of the external 16-bit ADC (not synthesizable
// logic; for testbenches only).
//
// A rising CONVST samples vin_code and raises BUSY for T_CONV clocks. While
// RD is low the data bus carries the last result; otherwise it reads 0.
// With NO_BUSY = 1 the converter never raises BUSY (a dead part), so the
// driver's timeout path can be exercised. conversions counts CONVST pulses.
module adc_model #(
  parameter int unsigned T_CONV  = 40,
  parameter bit          NO_BUSY = 1'b0
) (
  input  logic        clk,
  input  logic        convst,
  input  logic        rd_n,
  input  logic [15:0] vin_code,
  output logic        busy,
  output logic [15:0] data,
  output int unsigned conversions
);
  logic        convst_q = 1'b0;
  logic [15:0] result = '0;
  int unsigned left = 0;

  initial begin
    busy = 1'b0;
    conversions = 0;
  end

  always @(posedge clk) begin
    convst_q <= convst;
    if (convst && !convst_q) begin
      result      <= vin_code;
      conversions <= conversions + 1;
      if (!NO_BUSY) begin
        busy <= 1'b1;
        left <= T_CONV;
      end
    end else if (left > 1) begin
      left <= left - 1;
    end else if (left == 1) begin
      left <= 0;
      busy <= 1'b0;
    end
  end

  assign data = rd_n ? 16'h0000 : result;
endmodule
