// rmsdmd_pkg: types and constants shared by the randomized multistage
// sigma-delta PWM controller.
//
// Duty ratios are carried as unsigned 16-bit fractions (value / 2^16), the
// same width as the 16-bit ADC result. The randomization mode selects which
// of the three switching parameters (frequency, duty, pulse position) are
// drawn from the pseudorandom streams each switching cycle.
package rmsdmd_pkg;

  localparam int unsigned DUTY_W = 16;  // duty fraction width
  localparam int unsigned ADC_W  = 16;  // ADC result width

  typedef logic [DUTY_W-1:0] duty_t;
  typedef logic [ADC_W-1:0]  adc_code_t;

  // Which switching parameters are randomized. The main configuration
  // (randomized duty only, fixed frequency and position) is RAND_MODE_MAIN.
  typedef struct packed {
    logic rand_freq;  // F_k = FL + J*IN, new value every cycle
    logic rand_duty;  // d_k dithered around the compensator duty
    logic rand_pos;   // eps_k: pulse delayed by a random share of off-time
  } rand_mode_t;

  localparam rand_mode_t RAND_MODE_MAIN = '{rand_freq: 1'b0, rand_duty: 1'b1, rand_pos: 1'b0};

endpackage
