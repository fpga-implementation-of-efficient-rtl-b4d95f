// dwt_col_window -- line buffers that present a nine-row window of one
// column to the (9,7) datapath, for the column pass of the 2D DWT.
//
// Eight line buffers hold, for every column, the previous eight row-pass
// values of that column (buffer 0 the most recent). When a value v arrives
// for column addr, the window register is loaded with
//   tap 0 = v, tap k = buffer k-1 [addr]  (k = 1..8)
// and the buffers shift down at that address (buffer 0 takes v, buffer k
// takes buffer k-1). This is the column counterpart of dwt_delay_line: the
// window moves one row down in one column per shift, so the same datapath
// that filters rows filters columns.
//
// Each buffer entry stores the value with its tap_meta_t tags. The buffers
// are plain single-port memories without reset (read and write at the same
// address in one cycle). Right after reset their contents are unknown, so a
// saturating count of the rows written since reset (a row ends with a shift
// at the last column; the first image arrives in raster order) marks buffer
// k-1 as empty until k rows have passed. Images must therefore have at least
// 8 rows. fresh is high in the cycle after a shift; win_addr is the column of
// the window then shown. Line buffers in place of a transposition memory
// are this design's reading of "column processing starts once enough rows
// are filtered".
module dwt_col_window
  import dwt97_pkg::*;
#(
  parameter int W    = 18,
  parameter int COLS = 256,
  localparam int AW  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic [AW-1:0]       addr,
  input  logic signed [W-1:0] in_data,
  input  tap_meta_t           in_meta,
  output logic signed [W-1:0] tap_data [NTAPS],
  output tap_meta_t           tap_meta [NTAPS],
  output logic [AW-1:0]       win_addr,
  output logic                fresh
);

  localparam int NLB = NTAPS - 1;

  typedef struct packed {
    tap_meta_t           meta;
    logic signed [W-1:0] data;
  } entry_t;

  entry_t rd [NTAPS];          // rd[0]: incoming value, rd[k]: buffer k-1 at addr
  logic [3:0] rows_q;          // rows written since reset, saturating at NLB

  assign rd[0] = '{meta: in_meta, data: in_data};

  for (genvar k = 0; k < NLB; k++) begin : g_lb
    entry_t mem [COLS];
    assign rd[k+1] = mem[addr];
    always_ff @(posedge clk) begin
      if (shift_en) mem[addr] <= rd[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) begin
        tap_data[k] <= '0;
        tap_meta[k] <= '0;
      end
      rows_q   <= '0;
      win_addr <= '0;
      fresh    <= 1'b0;
    end else begin
      fresh <= shift_en;
      if (shift_en) begin
        win_addr <= addr;
        for (int k = 0; k < NTAPS; k++) begin
          tap_data[k] <= rd[k].data;
          tap_meta[k] <= rd[k].meta;
          if (k > int'(rows_q)) tap_meta[k].valid <= 1'b0;
        end
        if (addr == AW'(COLS - 1) && rows_q != 4'(NLB)) rows_q <= rows_q + 4'd1;
      end
    end
  end

endmodule
