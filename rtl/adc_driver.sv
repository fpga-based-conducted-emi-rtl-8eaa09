// adc_driver: reads the external 16-bit ADC once per switching cycle.
//
// Sequence, started by the DPWM's cycle_start so that each conversion begins
// with a switching cycle and ends inside it:
//   1. CONVST high for T_CONVST clocks (starts the conversion);
//   2. wait until the ADC has raised BUSY and dropped it again;
//   3. RD low for T_RD clocks; the data bus is latched on the last of them;
//   4. RD back high, and Read Now (rn) high for one clock with the result on
//      data, telling the compensator to take it.
// A start that arrives while a read is in progress is ignored. If BUSY does
// not fall within T_TIMEOUT clocks of CONVST the read is done anyway.
// The RD-low read and the Read Now strobe after RD rises follow the published design;
// the CONVST/BUSY handshake, the pulse lengths and the timeout are this
// design's choices, sized for a 50 MHz clock.
module adc_driver
  import rmsdmd_pkg::*;
#(
  parameter int unsigned T_CONVST  = 2,
  parameter int unsigned T_RD      = 3,
  parameter int unsigned T_TIMEOUT = 120
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  // ADC pins
  output logic      adc_convst,
  output logic      adc_rd_n,
  input  logic      adc_busy,
  input  adc_code_t adc_data,
  // to the compensator
  output logic      rn,
  output adc_code_t data
);

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_WAIT, S_READ} state_t;
  state_t state;
  localparam int unsigned TW = $clog2(T_TIMEOUT+1);
  logic [TW-1:0] tmr;
  logic busy_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; tmr <= '0; busy_seen <= 1'b0;
      adc_convst <= 1'b0; adc_rd_n <= 1'b1; rn <= 1'b0; data <= '0;
    end else begin
      rn <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_CONV; adc_convst <= 1'b1; tmr <= '0; busy_seen <= 1'b0;
        end
        S_CONV: begin
          tmr <= tmr + 1'b1;
          if (adc_busy) busy_seen <= 1'b1;
          if (tmr == TW'(T_CONVST - 1)) begin
            adc_convst <= 1'b0; state <= S_WAIT;
          end
        end
        S_WAIT: begin
          tmr <= tmr + 1'b1;
          if (adc_busy) busy_seen <= 1'b1;
          if ((busy_seen && !adc_busy) || tmr == TW'(T_TIMEOUT)) begin
            state <= S_READ; adc_rd_n <= 1'b0; tmr <= '0;
          end
        end
        S_READ: begin
          tmr <= tmr + 1'b1;
          if (tmr == TW'(T_RD - 1)) begin
            data <= adc_data; adc_rd_n <= 1'b1; rn <= 1'b1; state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // RD and CONVST are never active together
  assert property (@(posedge clk) disable iff (!rst_n) !(adc_convst && !adc_rd_n));

endmodule
