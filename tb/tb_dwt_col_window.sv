// tb_dwt_col_window -- checks the line-buffer window on 8 columns against a
// per-column history model: random values and tags shifted in at random
// column addresses with random shift enables; after every shift the window
// must show the new value followed by the eight previous values of that
// column, with their tags, the column address and the fresh flag. The
// first rows come in raster order, as after reset in the 2D transform, and
// line-buffer slots not yet written must read as empty.
module tb_dwt_col_window;
  import dwt97_pkg::*;

  localparam int W = 18, COLS = 8, AW = 3;
  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0, fresh;
  logic [AW-1:0] addr = '0, win_addr;
  logic signed [W-1:0] in_data = '0;
  tap_meta_t in_meta = '0;
  logic signed [W-1:0] tap_data [NTAPS];
  tap_meta_t tap_meta [NTAPS];
  int checks = 0, failures = 0;

  dwt_col_window #(.W(W), .COLS(COLS)) dut (.*);

  always #5 clk = !clk;

  logic signed [W-1:0] h_data [COLS][NTAPS-1];
  tap_meta_t h_meta [COLS][NTAPS-1];
  logic signed [W-1:0] e_data [NTAPS];
  tap_meta_t e_meta [NTAPS];
  logic [AW-1:0] e_addr;

  initial begin
    bit did;
    int raster;
    raster = 0;
    for (int c = 0; c < COLS; c++)
      for (int k = 0; k < NTAPS - 1; k++) begin h_data[c][k] = '0; h_meta[c][k] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    did = 0;
    for (int step = 0; step < 700; step++) begin
      @(negedge clk);
      if (did) begin
        checks++;
        if (!fresh || win_addr != e_addr) begin failures++; $display("FAIL: fresh/address"); end
        for (int k = 0; k < NTAPS; k++) begin
          // data of an empty (never written) slot is don't-care
          checks++;
          if (tap_meta[k].valid != e_meta[k].valid ||
              (e_meta[k].valid && (tap_meta[k] != e_meta[k] || tap_data[k] != e_data[k]))) begin
            failures++;
            if (failures < 10) $display("FAIL: tap %0d got %0d expected %0d", k, tap_data[k], e_data[k]);
          end
        end
      end else begin
        checks++;
        if (fresh) begin failures++; $display("FAIL: fresh without shift"); end
      end
      shift_en = ($urandom_range(0, 3) != 0);
      // the first image arrives in raster order: 10 rows of all columns
      if (step < 10 * COLS * 2) addr = AW'(raster);
      else                      addr = AW'($urandom);
      if (shift_en) raster = (raster + 1) % COLS;
      in_data  = $signed(W'($urandom));
      in_meta  = tap_meta_t'($urandom);
      in_meta.valid = 1'b1;
      did = shift_en;
      if (shift_en) begin
        e_addr = addr;
        e_data[0] = in_data; e_meta[0] = in_meta;
        for (int k = 1; k < NTAPS; k++) begin e_data[k] = h_data[addr][k-1]; e_meta[k] = h_meta[addr][k-1]; end
        for (int k = NTAPS - 2; k > 0; k--) begin h_data[addr][k] = h_data[addr][k-1]; h_meta[addr][k] = h_meta[addr][k-1]; end
        h_data[addr][0] = in_data; h_meta[addr][0] = in_meta;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
