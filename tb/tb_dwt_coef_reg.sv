// tb_dwt_coef_reg -- checks the coefficient registers: reset contents, the
// value of every approximated coefficient (expected integers written out by
// hand: round(c * 4096) cut to its four leading signed power-of-two terms),
// that each approximation is within 2^-8 of the exact filter tap, and that
// the registers switch set only when loaded.
module tb_dwt_coef_reg;
  import dwt97_pkg::*;

  localparam int HQ [5] = '{2464, 1093, -320, -69, 110};
  localparam int GQ [5] = '{4568, -2424, -236, 374, 0};
  localparam real HR [5] = '{0.602949018236, 0.266864118443, -0.078223266529,
                             -0.016864118443, 0.026748757411};
  localparam real GR [5] = '{1.115087052457, -0.591271763114, -0.057543526229,
                             0.091271763114, 0.0};

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, sel_high = 1'b0;
  csd_t coef [NGRP];
  int checks = 0, failures = 0;

  dwt_coef_reg #(.COEF_FRAC(12), .CSD_TERMS(4)) dut (.*);

  always #5 clk = !clk;

  task automatic expect_set(bit high, string when);
    for (int k = 0; k < NGRP; k++) begin
      int v, e, terms;
      v = csd_value(coef[k]);
      e = high ? GQ[k] : HQ[k];
      terms = $countones(coef[k].pos) + $countones(coef[k].neg);
      checks++;
      if (v != e || terms > 4 || (coef[k].pos & coef[k].neg) != '0) begin
        failures++;
        $display("FAIL %s: tap %0d high=%0d value %0d expected %0d (%0d terms)", when, k, high, v, e, terms);
      end
    end
  endtask

  initial begin
    // approximation error against the exact taps
    for (int k = 0; k < NGRP; k++) begin
      real eh, eg;
      eh = real'(HQ[k]) / 4096.0 - HR[k];
      eg = real'(GQ[k]) / 4096.0 - GR[k];
      checks++;
      if (eh > 1.0/256 || eh < -1.0/256 || eg > 1.0/256 || eg < -1.0/256) begin
        failures++;
        $display("FAIL: tap %0d approximation too coarse", k);
      end
    end
    @(posedge clk);
    #1;
    expect_set(0, "reset");
    @(negedge clk) rst_n = 1'b1;
    // alternate every clock as in a continuous stream
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) begin load = 1'b1; sel_high = (i % 2 == 0); end
      @(negedge clk) expect_set(i % 2 == 0, "after load");
      load = 1'b0;
    end
    // no load: contents hold
    @(negedge clk) begin load = 1'b1; sel_high = 1'b1; end
    @(negedge clk) begin load = 1'b0; sel_high = 1'b0; end
    repeat (3) @(negedge clk);
    expect_set(1, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
