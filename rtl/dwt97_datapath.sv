// dwt97_datapath -- the shared arithmetic of the fast-convolution (9,7) DWT:
// symmetric pre-adders, coefficient registers, five multiplier-less
// shift-add multipliers and the pipelined adder tree.
//
// It consumes one nine-tap window per clock (tap 0 newest, tap 4 centre;
// each tap with its tap_meta_t tags) whenever `fresh` is high and the key
// tap 3 holds a sample, and returns one filter output per window: y_H when
// the key sample has an even index, y_L when it is odd. The window source
// decides the direction: a shift register along a row (fc_dwt97) or line
// buffers down the columns (dwt_col_window in dwt2d). in_tag is carried to
// out_tag unchanged.
//
// The structure follows the architecture; the stage split is this design's.
//
// Timing: 4 register stages (pre-add + coefficient, product, partial sum,
// output); one result per clock. Output is OUT_W = W+2 bits, rounded.
module dwt97_datapath
  import dwt97_pkg::*;
#(
  parameter int W         = 16,
  parameter int COEF_FRAC = 12,
  parameter int CSD_TERMS = 4,
  parameter int TAG_W     = 1,
  localparam int OUT_W    = W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    fresh,
  input  logic signed [W-1:0]     tap_data [NTAPS],
  input  tap_meta_t               tap_meta [NTAPS],
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic                    out_high,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] out_data,
  output logic [TAG_W-1:0]        out_tag
);

  localparam int SUM_W = W + 1;
  localparam int P_W   = SUM_W + COEF_FRAC + 2;

  initial begin
    assert (COEF_FRAC >= 1 && COEF_FRAC + 3 <= CSD_W)
      else $error("dwt97_datapath: COEF_FRAC must lie in 1..%0d", CSD_W - 3);
  end

  logic signed [SUM_W-1:0] grp_sum [NGRP];
  logic                    pa_valid, pa_high, pa_last;
  logic [TAG_W-1:0]        pa_tag;
  csd_t                    coef [NGRP];
  logic signed [P_W-1:0]   prod [NGRP];

  dwt_preadd #(.W(W), .TAG_W(TAG_W)) u_preadd (
    .clk, .rst_n,
    .fresh, .tap_data, .tap_meta, .in_tag,
    .grp_sum,
    .out_valid (pa_valid),
    .out_high  (pa_high),
    .out_last  (pa_last),
    .out_tag   (pa_tag)
  );

  // Loaded in the same edge as the pre-add registers, from the same window.
  dwt_coef_reg #(.COEF_FRAC(COEF_FRAC), .CSD_TERMS(CSD_TERMS)) u_coef (
    .clk, .rst_n,
    .load     (fresh && tap_meta[KEY_TAP].valid),
    .sel_high (!tap_meta[KEY_TAP].odd),
    .coef
  );

  for (genvar k = 0; k < NGRP; k++) begin : g_mult
    csd_mult #(.IN_W(SUM_W), .COEF_FRAC(COEF_FRAC)) u_mult (
      .x (grp_sum[k]),
      .c (coef[k]),
      .p (prod[k])
    );
  end

  dwt_adder_tree #(.P_W(P_W), .COEF_FRAC(COEF_FRAC), .OUT_W(OUT_W), .TAG_W(TAG_W)) u_tree (
    .clk, .rst_n,
    .in_valid (pa_valid),
    .in_high  (pa_high),
    .in_last  (pa_last),
    .in_tag   (pa_tag),
    .prod,
    .out_valid, .out_high, .out_last, .out_data, .out_tag
  );

endmodule
