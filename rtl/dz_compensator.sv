// dz_compensator: dead-zone digital compensator.
//
// On each Read Now strobe it compares the ADC code of the output voltage with
// the reference code, e = vref - vout. If |e| is within the dead zone the
// duty ratio is frozen (frozen = 1); otherwise e is added to an integrator
// that keeps KI_SHIFT fraction bits below the duty LSB, so the duty moves by
// e / 2^KI_SHIFT without losing small errors to truncation. The integrator is
// limited to [DUTY_MIN, DUTY_MAX] (in duty units). The new duty is used from
// the next switching cycle on.
// The cycle-by-cycle update, the freezing near the set point and the dead-zone
// comparator follow the published design; the integral law, its gain, the limits and
// the start value are this design's choices.
//
// Timing: duty and frozen change on the clock after rn.
module dz_compensator
  import rmsdmd_pkg::*;
#(
  parameter int unsigned KI_SHIFT  = 8,
  parameter duty_t       DUTY_INIT = 16'd0,
  parameter duty_t       DUTY_MIN  = 16'd0,
  parameter duty_t       DUTY_MAX  = 16'd58982   // 0.9
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      rn,
  input  adc_code_t vout,
  input  adc_code_t vref,
  input  adc_code_t dead_zone,
  output duty_t     duty,
  output logic      frozen
);

  localparam int unsigned AW = DUTY_W + KI_SHIFT + 2;   // signed integrator sum
  typedef logic signed [AW-1:0] acc_t;
  localparam acc_t ACC_MIN = acc_t'({2'b00, DUTY_MIN, {KI_SHIFT{1'b0}}});
  localparam acc_t ACC_MAX = acc_t'({2'b00, DUTY_MAX, {KI_SHIFT{1'b0}}});

  logic signed [ADC_W:0] err;
  logic        [ADC_W:0] err_abs;
  logic [DUTY_W+KI_SHIFT-1:0] acc;   // duty with KI_SHIFT fraction bits
  acc_t acc_new;

  always_comb begin
    err     = signed'({1'b0, vref}) - signed'({1'b0, vout});
    err_abs = err[ADC_W] ? (ADC_W+1)'(-err) : (ADC_W+1)'(err);
    acc_new = signed'(acc_t'({2'b00, acc})) + acc_t'(err);
    if (acc_new < ACC_MIN)      acc_new = ACC_MIN;
    else if (acc_new > ACC_MAX) acc_new = ACC_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= {DUTY_INIT, {KI_SHIFT{1'b0}}}; frozen <= 1'b0;
    end else if (rn) begin
      if (err_abs <= (ADC_W+1)'(dead_zone)) begin
        frozen <= 1'b1;
      end else begin
        frozen <= 1'b0;
        acc    <= acc_new[DUTY_W+KI_SHIFT-1:0];
      end
    end
  end

  assign duty = acc[DUTY_W+KI_SHIFT-1:KI_SHIFT];

endmodule
