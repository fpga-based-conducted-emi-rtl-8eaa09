// rand_dpwm: counter-based randomized digital PWM.
//
// A clocked counter runs from 0 to SN-1, then restarts; each run is one
// switching cycle. At the end of a cycle the block takes the duty fraction d
// (16-bit, d/2^16) and the random integers IN_f, IN_p for the next cycle and
// sets, following the published design's equations:
//   Fsw = FL + J * IN_f          (rand_freq = 1; otherwise Fsw = FC)
//   SN  = Fclk / Fsw             clocks in the cycle
//   DR  = SN * d                 clocks with the gate on
//   DS  = (SN - DR) * IN_p / 2^INW   clocks before the pulse starts
//                                (rand_pos = 1; otherwise 0)
// The division is done by a sequential divider during the cycle before the
// one it applies to, so a random frequency drawn at the end of cycle k sets
// the length of cycle k+2; duty and position drawn at the end of cycle k apply
// to cycle k+1. The first cycle after reset is SN = Fclk/FC clocks with the
// gate off.
//
// The equations follow the published design. The pulse-position formula (keeping the
// pulse inside its cycle), the frequency limits (FL = 270 kHz, J = 1 kHz with
// 6-bit IN, giving 270-333 kHz around the 300 kHz centre), the 50 MHz clock and
// the one-cycle-ahead pipelining are this design's choices.
//
// Timing: cycle_start is high for the clock in which the counter is 0. gate
// is a register, high while the counter is in [DS, DS+DR): exactly DR clocks
// per cycle.
module rand_dpwm
  import rmsdmd_pkg::*;
#(
  parameter int unsigned FCLK_HZ = 50_000_000,
  parameter int unsigned FC_HZ   = 300_000,
  parameter int unsigned FL_HZ   = 270_000,
  parameter int unsigned J_HZ    = 1_000,
  parameter int unsigned INW     = 6,
  parameter int unsigned CW      = 16     // clock-count width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rand_freq,
  input  logic            rand_pos,
  input  duty_t           duty,
  input  logic [INW-1:0]  in_f,
  input  logic [INW-1:0]  in_p,
  output logic            cycle_start,
  output logic            gate,
  output logic [CW-1:0]   sn,
  output logic [CW-1:0]   dr,
  output logic [CW-1:0]   ds
);

  localparam logic [CW-1:0] SN_C = CW'(FCLK_HZ / FC_HZ);
  localparam int unsigned FMAX_HZ = FL_HZ + J_HZ * ((1 << INW) - 1);

  initial begin
    // the divider must finish inside the shortest cycle
    assert (FCLK_HZ / FMAX_HZ > 40)
      else $error("rand_dpwm: shortest switching cycle too short for the divider");
  end

  logic [CW-1:0] cnt, sn_next;
  logic          period_end;
  logic [31:0]   fsw;
  logic [CW-1:0] dr_calc, ds_calc;
  logic [CW-1:0] cnt_n, ds_n, dr_n;
  logic [2*CW-1:0] dr_prod;
  logic [CW+INW-1:0] ds_prod;
  logic          div_done, div_busy;
  logic [CW-1:0] div_quot;

  assign period_end = (cnt == sn - 1'b1);

  always_comb begin
    fsw     = rand_freq ? 32'(FL_HZ + J_HZ * int'(in_f)) : 32'(FC_HZ);
    dr_prod = (2*CW)'(sn_next) * (2*CW)'(duty);
    dr_calc = CW'(dr_prod >> DUTY_W);
    ds_prod = (CW+INW)'(sn_next - dr_calc) * (CW+INW)'(in_p);
    ds_calc = rand_pos ? CW'(ds_prod >> INW) : '0;
    // counter, delay and width as they will be on the next clock
    cnt_n = period_end ? '0 : cnt + 1'b1;
    ds_n  = period_end ? ds_calc : ds;
    dr_n  = period_end ? dr_calc : dr;
  end

  seq_divider #(.NW(32), .DW(32), .QW(CW)) u_div (
    .clk, .rst_n,
    .start    (period_end),
    .dividend (32'(FCLK_HZ)),
    .divisor  (fsw),
    .busy     (div_busy),
    .done     (div_done),
    .quot     (div_quot)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; sn <= SN_C; sn_next <= SN_C; dr <= '0; ds <= '0;
      cycle_start <= 1'b1; gate <= 1'b0;
    end else begin
      cycle_start <= period_end;
      if (period_end) begin
        cnt <= '0;
        sn  <= sn_next;
        dr  <= dr_calc;
        ds  <= ds_calc;
      end else begin
        cnt <= cnt + 1'b1;
      end
      if (div_done) sn_next <= div_quot;
      gate <= (cnt_n >= ds_n) && ((cnt_n - ds_n) < dr_n);
    end
  end

  // a new cycle must never find the previous division still running
  assert property (@(posedge clk) disable iff (!rst_n) period_end |-> !div_busy);

endmodule
