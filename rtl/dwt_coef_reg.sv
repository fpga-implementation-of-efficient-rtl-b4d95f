// dwt_coef_reg -- coefficient registers that send either the low-pass or the
// high-pass coefficient set to the shared multipliers.
//
// The five multipliers of the fast-convolution DWT are shared by both
// filters: in the cycle a low-pass window is processed they must multiply by
// h0..h4, in the next (high-pass) cycle by g0..g3 and 0. The registers are
// loaded in the same clock edge as the pre-adder registers, with the high-
// pass set when sel_high is 1 and the low-pass set otherwise, so coefficient
// and data reach the multipliers together. With a continuous input stream
// the contents alternate every clock.
//
// Each coefficient is stored in the shift-add form of csd_mult: rounded to
// COEF_FRAC fractional bits and approximated by its CSD_TERMS most
// significant canonical signed digits (see dwt97_pkg). Both sets are
// elaboration-time constants. Reset loads the low-pass set.
module dwt_coef_reg
  import dwt97_pkg::*;
#(
  parameter int COEF_FRAC = 12,
  parameter int CSD_TERMS = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic sel_high,
  output csd_t coef [NGRP]
);

  for (genvar k = 0; k < NGRP; k++) begin : g_coef
    localparam csd_t LP = csd_approx(quantize(H_REF[k], COEF_FRAC), CSD_TERMS);
    localparam csd_t HP = csd_approx(quantize(G_REF[k], COEF_FRAC), CSD_TERMS);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    coef[k] <= LP;
      else if (load) coef[k] <= sel_high ? HP : LP;
    end
  end

endmodule
