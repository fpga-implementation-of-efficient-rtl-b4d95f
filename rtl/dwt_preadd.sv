// dwt_preadd -- symmetric pre-adders of the fast-convolution (9,7) DWT.
//
// Both (9,7) filters are symmetric about their centre, so the two samples
// that meet the same coefficient are added before the multiplication:
//   grp_sum[0] = x[c]                (centre tap, tap 4)
//   grp_sum[k] = x[c-k] + x[c+k]     k = 1..4 (taps 4-k and 4+k)
// which halves the number of multiplications. The low-pass output uses all
// five sums with h0..h4; the high-pass output uses the first four with
// g0..g3 (the fifth sum meets a zero coefficient).
//
// Which output a window gives is decided by the key tap (tap 3, one sample
// newer than the centre): when it holds an even-indexed sample x[2n] the
// window is centred on x[2n-1] and yields the high-pass y_H(n); when it holds
// x[2n+1] the window is centred on x[2n] and yields the low-pass y_L(n). A
// tap that is empty or belongs to a different frame than the key tap stands
// for a sample outside the frame and is read as zero, which is exactly the
// zero padding of the boundary equations.
//
// in_tag is a free side-band word (e.g. the column address in the 2D
// transform) that is captured with the window and travels with its result.
//
// Timing: one register stage. A window with fresh = 1 and a valid key tap is
// captured at the clock edge; out_valid/out_high/out_last and grp_sum show it
// during the next cycle.
module dwt_preadd
  import dwt97_pkg::*;
#(
  parameter int W     = 16,
  parameter int TAG_W = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                fresh,
  input  logic signed [W-1:0] tap_data [NTAPS],
  input  tap_meta_t           tap_meta [NTAPS],
  input  logic [TAG_W-1:0]    in_tag,
  output logic signed [W:0]   grp_sum  [NGRP],
  output logic                out_valid,
  output logic                out_high,
  output logic                out_last,
  output logic [TAG_W-1:0]    out_tag
);

  logic signed [W-1:0] masked [NTAPS];
  logic signed [W:0]   sum_d  [NGRP];
  logic                take;

  always_comb begin
    for (int i = 0; i < NTAPS; i++) begin
      masked[i] = (tap_meta[i].valid && tap_meta[i].frame == tap_meta[KEY_TAP].frame)
                  ? tap_data[i] : '0;
    end
    sum_d[0] = (W+1)'(masked[CENTER_TAP]);
    for (int k = 1; k < NGRP; k++) begin
      sum_d[k] = (W+1)'(masked[CENTER_TAP-k]) + (W+1)'(masked[CENTER_TAP+k]);
    end
  end

  assign take = fresh && tap_meta[KEY_TAP].valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NGRP; k++) grp_sum[k] <= '0;
      out_valid <= 1'b0;
      out_high  <= 1'b0;
      out_last  <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= take;
      if (take) begin
        for (int k = 0; k < NGRP; k++) grp_sum[k] <= sum_d[k];
        out_high <= !tap_meta[KEY_TAP].odd;
        out_last <= tap_meta[KEY_TAP].last;
        out_tag  <= in_tag;
      end
    end
  end

endmodule
