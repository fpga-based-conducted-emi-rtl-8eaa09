// rmsdmd_top: FPGA digital controller of a randomly switched DC-DC buck
// converter, using a randomized multistage sigma-delta PWM with decimator.
//
// Data flow, once per switching cycle:
//   adc_driver     reads the 16-bit output-voltage code at the start of the cycle
//   dz_compensator turns the error against vref into a duty fraction d(n+1),
//                  frozen inside a dead zone
//   lfsr_prng      three parallel 16-bit LFSR streams: stream 0 -> frequency
//                  integer IN_f, stream 1 -> duty dither, stream 2 -> pulse
//                  position integer IN_p
//   mash211        2-1-1 MASH modulator, every clock, on d plus a dither that
//                  is drawn at each cycle start, uniform in [-R/2, R/2)
//                  (R = rand_level, the randomness level d2 - d1)
//   cic_decimator  K=4, N=8 comb decimator back to a 16-bit duty word d_k
//   rand_dpwm      cycle length SN = Fclk/Fsw, on-time DR = SN*d_k, delay DS;
//                  drives the gate
// mode selects which parameters are randomized; RAND_MODE_MAIN (duty only)
// is the main scheme, with fixed frequency and pulse position. The block set
// and their order follow the published design; the stream-to-parameter assignment, the
// dither held per cycle, and all widths are this design's choices.
//
// Ports: ADC pins (convst, rd_n, busy, data), the gate signal for the power
// switch driver, and status outputs. Everything runs on one clock (50 MHz).
module rmsdmd_top
  import rmsdmd_pkg::*;
#(
  parameter int unsigned FCLK_HZ = 50_000_000,
  parameter int unsigned FC_HZ   = 300_000,
  parameter int unsigned FL_HZ   = 270_000,
  parameter int unsigned J_HZ    = 1_000,
  parameter int unsigned INW     = 6,
  parameter int unsigned CIC_K   = 4,
  parameter int unsigned CIC_N   = 8,
  parameter int unsigned CIC_D   = 1,
  parameter int unsigned KI_SHIFT = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  rand_mode_t mode,
  input  duty_t      rand_level,   // R = d2 - d1, as a duty fraction
  input  adc_code_t  vref,
  input  adc_code_t  dead_zone,
  // external ADC
  output logic       adc_convst,
  output logic       adc_rd_n,
  input  logic       adc_busy,
  input  adc_code_t  adc_data,
  // power stage
  output logic       gate,
  // status
  output logic       cycle_start,
  output duty_t      duty_cmd,     // compensator output d(n)
  output duty_t      duty_k,       // randomized duty applied to the DPWM
  output logic       frozen,
  output logic [15:0] sn,
  output logic [15:0] dr,
  output logic [15:0] ds
);

  localparam int unsigned MASH_YW = 5;
  localparam int unsigned CIC_GB  = CIC_K * $clog2(CIC_N * CIC_D);
  localparam int unsigned CIC_OW  = MASH_YW + CIC_GB;
  localparam int unsigned SH      = DUTY_W - CIC_GB;

  initial begin
    assert (CIC_GB <= DUTY_W && (1 << $clog2(CIC_N * CIC_D)) == CIC_N * CIC_D)
      else $error("rmsdmd_top: CIC gain must be a power of two no above 2^16");
  end

  // pseudorandom streams
  logic [15:0] rnd [3];
  lfsr_prng #(.W(16)) u_prng (.clk, .rst_n, .en(1'b1), .rnd);

  // ADC read and compensator
  logic      rn;
  adc_code_t vout;
  adc_driver u_adc (
    .clk, .rst_n, .start(cycle_start),
    .adc_convst, .adc_rd_n, .adc_busy, .adc_data,
    .rn, .data(vout)
  );

  dz_compensator #(.KI_SHIFT(KI_SHIFT)) u_comp (
    .clk, .rst_n, .rn, .vout, .vref, .dead_zone,
    .duty(duty_cmd), .frozen
  );

  // duty dither, drawn at each cycle start
  logic signed [16:0] dither;
  logic [31:0]        dprod;
  assign dprod = 32'(rnd[1]) * 32'(rand_level);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      dither <= '0;
    else if (cycle_start)
      dither <= mode.rand_duty
              ? signed'({1'b0, dprod[31:16]}) - signed'(17'({1'b0, rand_level} >> 1))
              : '0;
  end

  // multistage sigma-delta modulator and comb decimator
  logic signed [MASH_YW-1:0] y_sd;
  mash211 #(.W(16), .DW(17), .YW(MASH_YW)) u_mash (
    .clk, .rst_n, .en(1'b1), .x(duty_cmd), .dither, .y(y_sd)
  );

  logic                     cic_valid;
  logic signed [CIC_OW-1:0] cic_out;
  cic_decimator #(.K(CIC_K), .N(CIC_N), .D(CIC_D), .IN_W(MASH_YW)) u_cic (
    .clk, .rst_n, .in_valid(1'b1), .in(y_sd), .out_valid(cic_valid), .out(cic_out)
  );

  // back to a 16-bit duty fraction, clamped
  logic signed [CIC_OW+SH:0] dk_wide;
  assign dk_wide = (CIC_OW+SH+1)'(cic_out) <<< SH;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      duty_k <= '0;
    else if (cic_valid) begin
      if (dk_wide < 0)                                         duty_k <= '0;
      else if (dk_wide > signed'((CIC_OW+SH+1)'(16'hFFFF)))    duty_k <= '1;
      else                                                     duty_k <= dk_wide[15:0];
    end
  end

  rand_dpwm #(
    .FCLK_HZ(FCLK_HZ), .FC_HZ(FC_HZ), .FL_HZ(FL_HZ), .J_HZ(J_HZ), .INW(INW), .CW(16)
  ) u_dpwm (
    .clk, .rst_n,
    .rand_freq(mode.rand_freq), .rand_pos(mode.rand_pos),
    .duty(duty_k), .in_f(rnd[0][INW-1:0]), .in_p(rnd[2][INW-1:0]),
    .cycle_start, .gate, .sn, .dr, .ds
  );

endmodule
