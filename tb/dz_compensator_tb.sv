// dz_compensator_tb: self-checking test of the dead-zone compensator.
//
// Random ADC codes, references and dead zones are applied with Read Now
// strobes (and some clocks without a strobe). A reference model computes the
// next duty as: frozen inside |vref - vout| <= dead_zone, otherwise
// an integrator acc + (vref - vout), limited to [0, 58982 * 256], whose
// duty is floor(acc / 256). Duty and the frozen
// flag are compared one clock after each strobe; without a strobe nothing
// may change. Both limits and the frozen case must be hit.
module dz_compensator_tb;
  import rmsdmd_pkg::*;

  localparam int KI_SHIFT = 8;
  localparam int DMAX = 58982;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rn = 0;
  adc_code_t vout = 0, vref = 0, dz = 0;
  duty_t duty;
  logic frozen;

  dz_compensator #(.KI_SHIFT(KI_SHIFT)) dut (
    .clk, .rst_n, .rn, .vout, .vref, .dead_zone(dz), .duty, .frozen);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model_duty = 0, model_acc = 0;
  bit model_frozen = 0;
  int hit_max = 0, hit_min = 0, hit_frozen = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(duty == 0 && !frozen, "reset value");
    for (int i = 0; i < 5000; i++) begin
      int e, nd;
      @(negedge clk);
      rn   = ($urandom_range(0, 3) != 0);
      vref = 16'($urandom_range(20000, 40000));
      // long pushes up then down reach both limits at this small gain
      case ((i < 1500 && i % 4 != 0) ? 2 : (i < 3000 && i % 4 != 0) ? 3 : $urandom_range(0, 3))
        0: vout = vref + 16'($urandom_range(0, 40)) - 16'd20;   // near the set point
        1: vout = 16'($urandom);
        2: vout = 16'd0;                                          // pushes up
        default: vout = 16'hFFFF;                                 // pushes down
      endcase
      dz = 16'($urandom_range(0, 30));
      if (rn) begin
        e = int'(vref) - int'(vout);
        if ((e < 0 ? -e : e) <= int'(dz)) begin
          model_frozen = 1;
          hit_frozen++;
        end else begin
          model_frozen = 0;
          nd = model_acc + e;
          if (nd > DMAX * (1 << KI_SHIFT)) begin nd = DMAX * (1 << KI_SHIFT); hit_max++; end
          if (nd < 0) begin nd = 0; hit_min++; end
          model_acc = nd;
          model_duty = nd >>> KI_SHIFT;
        end
      end
      @(negedge clk);
      rn = 0;
      check(int'(duty) == model_duty, $sformatf("duty %0d expected %0d", duty, model_duty));
      check(frozen == model_frozen, "frozen flag");
    end
    check(hit_max > 0 && hit_min > 0 && hit_frozen > 0, "limits and dead zone exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
