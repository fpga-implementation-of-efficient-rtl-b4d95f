// dwt2d -- one level of the two-dimensional (9,7) DWT of a COLS x ROWS
// image, built from the fast-convolution 1D datapath.
//
// The image enters in raster order, one pixel per clock. The row pass is a
// fc_dwt97: every image row is one frame, and its results leave in the
// order y_H(0), y_L(0), y_H(1), ... so position j of a row-pass row holds
// the high band when j is even and the low band when j is odd. The column
// pass filters each of those COLS positions down the image with the same
// (9,7) datapath (dwt97_datapath); its nine-row window comes from eight line
// buffers (dwt_col_window) instead of a shift register, sequenced by
// dwt_col_ctrl. Column results begin as soon as four rows have been row
// filtered, so no full-image transposition memory is needed and the two
// passes overlap.
//
//   pixels -> fc_dwt97 (rows) -> dwt_col_ctrl/dwt_col_window -> dwt97_datapath
//
// Output: one coefficient per out_valid. out_col is its column position j in
// the row-pass layout, out_hhigh = 1 when that position holds the row high
// band (j even), out_vhigh = 1 for the column high band. The four subbands
// are LL (0,0), LH/HL (mixed) and HH (1,1); the output row index inside a
// column follows the same alternation (H, L, H, L, ... down the column), and
// out_col_last marks the last output of column out_col for this image.
// Within a row of results the columns come in order; the last three result
// rows of an image leave either when the next image's first rows arrive or
// in idle cycles (column flush).
//
// Data: IN_W-bit signed pixels (an 8-bit grey level fits unchanged), row
// results IN_W+2 bits, outputs IN_W+4 bits, all rounded to integers. Images
// must have at least 8 rows and 5 columns.
// The row-then-column structure with early column start follows the
// architecture; the line-buffer window, output layout and all sizes except
// the 256 x 256 image are this design's choice.
module dwt2d
  import dwt97_pkg::*;
#(
  parameter int IN_W      = 16,
  parameter int COLS      = 256,
  parameter int ROWS      = 256,
  parameter int COEF_FRAC = 12,
  parameter int CSD_TERMS = 4,
  localparam int AW       = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int RW_W     = IN_W + 2,
  localparam int OUT_W    = IN_W + 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic [AW-1:0]           out_col,
  output logic                    out_hhigh,
  output logic                    out_vhigh,
  output logic                    out_col_last,
  output logic                    row_flushing,
  output logic                    col_flushing
);

  // pixel column counter: marks the end of each image row
  logic [AW-1:0] pix_col_q;
  logic          in_last;

  assign in_last = (pix_col_q == AW'(COLS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pix_col_q <= '0;
    else if (in_valid) pix_col_q <= in_last ? '0 : pix_col_q + 1'b1;
  end

  // row pass
  logic                   row_valid, row_high, row_last;
  logic signed [RW_W-1:0] row_data;

  fc_dwt97 #(.IN_W(IN_W), .COEF_FRAC(COEF_FRAC), .CSD_TERMS(CSD_TERMS)) u_row (
    .clk, .rst_n,
    .in_valid, .in_data, .in_last,
    .out_valid (row_valid),
    .out_high  (row_high),
    .out_last  (row_last),
    .out_data  (row_data),
    .flushing  (row_flushing)
  );

  // column pass
  logic                   col_shift;
  logic [AW-1:0]          col_addr;
  tap_meta_t              col_meta;
  logic signed [RW_W-1:0] win_data [NTAPS];
  tap_meta_t              win_meta [NTAPS];
  logic [AW-1:0]          win_addr;
  logic                   win_fresh;
  logic                   unused_row_flags;

  assign unused_row_flags = row_high ^ row_last;

  dwt_col_ctrl #(.COLS(COLS), .ROWS(ROWS)) u_cctl (
    .clk, .rst_n,
    .in_valid (row_valid),
    .shift_en (col_shift),
    .addr     (col_addr),
    .new_meta (col_meta),
    .flushing (col_flushing)
  );

  dwt_col_window #(.W(RW_W), .COLS(COLS)) u_cwin (
    .clk, .rst_n,
    .shift_en (col_shift),
    .addr     (col_addr),
    .in_data  (row_data),
    .in_meta  (col_meta),
    .tap_data (win_data),
    .tap_meta (win_meta),
    .win_addr,
    .fresh    (win_fresh)
  );

  dwt97_datapath #(.W(RW_W), .COEF_FRAC(COEF_FRAC), .CSD_TERMS(CSD_TERMS), .TAG_W(AW)) u_cdp (
    .clk, .rst_n,
    .fresh    (win_fresh),
    .tap_data (win_data),
    .tap_meta (win_meta),
    .in_tag   (win_addr),
    .out_valid,
    .out_high (out_vhigh),
    .out_last (out_col_last),
    .out_data,
    .out_tag  (out_col)
  );

  assign out_hhigh = !out_col[0];

endmodule
