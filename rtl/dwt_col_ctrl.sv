// dwt_col_ctrl -- sequencing of the column (vertical) pass of the 2D DWT.
//
// The row pass delivers its results in raster order, one row of COLS values
// after the other. Each value belongs to column addr = its position in the
// row and to row r of the image; the controller tags it like dwt_ctrl tags a
// 1D sample (row parity, image tag, last row of the image) and hands it to
// the line-buffer window together with its column address, so every column
// is filtered as an independent 1D signal running down the image. Column
// results therefore start as soon as the first rows have been row-filtered;
// no transposed copy of the image is kept.
//
// After the last row of an image every column still owes KEY_TAP (3)
// outputs, which need three more shifts of that column (owed[] holds the
// count per column). If the input is idle, the controller walks the columns
// and shifts empty bubbles into those still owed. Once a value of the next
// image reaches a column, that column owes nothing more: the new image's
// later rows push the rest of the tail out, and a bubble there would split
// the new image's rows. Real samples always win; bubbles use idle cycles
// only.
//
// Interface: in_valid (one row-pass value, raster order, no back pressure).
// shift_en/addr/new_meta drive dwt_col_window in the same cycle; flushing is
// high while a bubble is shifted. Images must have at least 8 rows (see
// dwt_col_window).
// Asynchronous active-low reset. All of this scheduling is this design's
// own; the architecture states only that column processing begins once enough
// rows are filtered.
module dwt_col_ctrl
  import dwt97_pkg::*;
#(
  parameter int COLS = 256,
  parameter int ROWS = 256,
  localparam int AW  = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int RW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          shift_en,
  output logic [AW-1:0] addr,
  output tap_meta_t     new_meta,
  output logic          flushing
);

  localparam int OWED_W = $clog2(KEY_TAP * COLS + 1);

  logic [AW-1:0]     col_q;     // column of the next row-pass value
  logic [RW-1:0]     row_q;     // its row
  logic              img_q;     // image tag
  logic [AW-1:0]     scan_q;    // bubble scan position
  logic [1:0]        owed_q [COLS];
  logic [OWED_W-1:0] owed_total_q;
  logic              img_end;
  logic              bubble;

  assign img_end = in_valid && col_q == AW'(COLS - 1) && row_q == RW'(ROWS - 1);
  assign bubble  = !in_valid && owed_total_q != '0 && owed_q[scan_q] != 2'd0;

  assign shift_en = in_valid || bubble;
  assign flushing = bubble;
  assign addr     = in_valid ? col_q : scan_q;

  always_comb begin
    new_meta = '0;
    if (in_valid) begin
      new_meta.valid = 1'b1;
      new_meta.frame = img_q;
      new_meta.odd   = row_q[0];
      new_meta.last  = (row_q == RW'(ROWS - 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q        <= '0;
      row_q        <= '0;
      img_q        <= 1'b0;
      scan_q       <= '0;
      owed_total_q <= '0;
      for (int c = 0; c < COLS; c++) owed_q[c] <= 2'd0;
    end else begin
      if (in_valid) begin
        if (col_q == AW'(COLS - 1)) begin
          col_q <= '0;
          row_q <= (row_q == RW'(ROWS - 1)) ? '0 : row_q + 1'b1;
        end else begin
          col_q <= col_q + 1'b1;
        end
      end else if (owed_total_q != '0) begin
        scan_q <= (scan_q == AW'(COLS - 1)) ? '0 : scan_q + 1'b1;
      end

      if (img_end) begin
        img_q        <= !img_q;
        owed_total_q <= OWED_W'(KEY_TAP * COLS);
        for (int c = 0; c < COLS; c++) owed_q[c] <= 2'(KEY_TAP);
      end else if (in_valid && owed_q[col_q] != 2'd0) begin
        // the next image has reached this column: its later rows push the
        // rest of the tail out, so no bubble may enter this column any more
        owed_q[col_q] <= 2'd0;
        owed_total_q  <= owed_total_q - OWED_W'(owed_q[col_q]);
      end else if (bubble) begin
        owed_q[scan_q] <= owed_q[scan_q] - 2'd1;
        owed_total_q   <= owed_total_q - 1'b1;
      end
    end
  end

endmodule
