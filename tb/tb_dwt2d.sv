// tb_dwt2d -- end-to-end test of the 2D (9,7) DWT at its default parameters
// (256 x 256 images): three images, the first with random input gaps, the
// second straight after it (its rows push the first image's last column
// results out), then idle cycles (row and column flush), the third with
// gaps again, the fourth with gaps after only 200 idle cycles (while the
// column flush of the third is still going on) and a final idle period.
//
// Reference: every image is transformed in the testbench from the zero-padded
// filter equations, first along each row (result position j: high band when
// j is even, low band when odd), then down each column of that result, with
// the approximated integer coefficients below and round-half-up after each
// pass. Each output is matched by its column and by the count of outputs
// already seen in that column (high band for even counts).
//
// Also checked: the column pass starts early (first column result exactly 5
// clocks after the row pass delivers row 3 of column position 0, long before
// the image is complete), all four subbands appear, and every mechanism
// (input stall, row flush, column flush, back-to-back images) happens.
module tb_dwt2d;
  import dwt97_pkg::*;

  localparam int IN_W  = 16;
  localparam int OUT_W = IN_W + 4;
  localparam int COLS  = 256;
  localparam int ROWS  = 256;
  localparam int NIMG  = 4;
  localparam int FRAC  = 12;
  localparam int AW    = $clog2(COLS);

  localparam int HQ [5] = '{2464, 1093, -320, -69, 110};
  localparam int GQ [5] = '{4568, -2424, -236, 374, 0};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0] in_data = '0;
  logic out_valid, out_hhigh, out_vhigh, out_col_last, row_flushing, col_flushing;
  logic signed [OUT_W-1:0] out_data;
  logic [AW-1:0] out_col;

  dwt2d dut (.*);

  always #5 clk = !clk;

  int img  [NIMG][ROWS][COLS];
  int rowt [ROWS][COLS];
  int expc [NIMG][ROWS][COLS];
  int col_cnt [COLS];
  int col_img [COLS];
  int checks = 0, failures = 0;
  longint cycle = 0;
  int pixels_in = 0, row_outs = 0;
  longint row3_cycle = -1, first_out_cycle = -1;
  int n_stall = 0, n_rflush = 0, n_cflush = 0, n_early = 0, n_sub [4];
  bit back_to_back = 0;

  // 1D (9,7) analysis of v[0..n-1] with zero padding: result position j is
  // y_H(j/2) (j even, centre j-1) or y_L((j-1)/2) (j odd, centre j-1)
  function automatic int dwt1(const ref int v [$], input int j);
    longint acc = 0;
    int n = v.size();
    int lim = (j % 2 == 0) ? 3 : 4;
    for (int k = -lim; k <= lim; k++) begin
      int i = j - 1 + k;
      int c = (j % 2 == 0) ? GQ[k < 0 ? -k : k] : HQ[k < 0 ? -k : k];
      if (i >= 0 && i < n) acc += longint'(c) * v[i];
    end
    return int'((acc + (longint'(1) << (FRAC - 1))) >>> FRAC);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20 || failures % 200 == 0) $display("FAIL: %s", what); end
  endtask

  initial begin
    int v [$];
    for (int m = 0; m < NIMG; m++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          img[m][r][c] = (m == 1) ? int'($signed(16'($urandom))) : int'($urandom_range(0, 255));
      for (int r = 0; r < ROWS; r++) begin
        v.delete();
        for (int c = 0; c < COLS; c++) v.push_back(img[m][r][c]);
        for (int j = 0; j < COLS; j++) rowt[r][j] = dwt1(v, j);
      end
      for (int j = 0; j < COLS; j++) begin
        v.delete();
        for (int r = 0; r < ROWS; r++) v.push_back(rowt[r][j]);
        for (int i = 0; i < ROWS; i++) expc[m][i][j] = dwt1(v, i);
      end
    end
    for (int j = 0; j < COLS; j++) begin col_cnt[j] = 0; col_img[j] = 0; end
    for (int s = 0; s < 4; s++) n_sub[s] = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid) pixels_in++;
      if (dut.row_valid) begin
        if (row_outs == 3 * COLS) row3_cycle = cycle;
        row_outs++;
      end
      if (row_flushing) n_rflush++;
      if (col_flushing) n_cflush++;
      if (out_valid) begin
        int j, i, m;
        j = int'(out_col);
        i = col_cnt[j];
        m = col_img[j];
        if (first_out_cycle < 0) begin
          first_out_cycle = cycle;
          check(row3_cycle >= 0 && cycle == row3_cycle + 5,
                $sformatf("first column result at %0d, row 3 entered at %0d", cycle, row3_cycle));
        end
        if (m >= NIMG) check(0, "too many outputs");
        else begin
          check(int'(out_data) == expc[m][i][j],
                $sformatf("image %0d row %0d col %0d: got %0d expected %0d", m, i, j, out_data, expc[m][i][j]));
          check(out_vhigh == (i % 2 == 0) && out_hhigh == (j % 2 == 0) && out_col_last == (i == ROWS - 1),
                $sformatf("image %0d row %0d col %0d: flags", m, i, j));
          n_sub[{out_vhigh, out_hhigh}]++;
          if (pixels_in < (m + 1) * ROWS * COLS) n_early++;
        end
        col_cnt[j]++;
        if (col_cnt[j] == ROWS) begin col_cnt[j] = 0; col_img[j]++; end
      end
    end
    cycle++;
  end

  task automatic send_image(int m, bit gaps);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        if (gaps && $urandom_range(0, 15) == 0) begin
          in_valid <= 1'b0;
          repeat ($urandom_range(1, 3)) @(posedge clk);
          n_stall++;
        end
        in_valid <= 1'b1;
        in_data  <= IN_W'(img[m][r][c]);
        @(posedge clk);
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    send_image(0, 1);
    send_image(1, 0);
    back_to_back = 1;
    in_valid <= 1'b0;
    repeat (2000) @(posedge clk);
    send_image(2, 1);
    // the next image arrives while the column flush is only partly done
    in_valid <= 1'b0;
    repeat (200) @(posedge clk);
    send_image(3, 1);
    in_valid <= 1'b0;
    repeat (2000) @(posedge clk);
    for (int j = 0; j < COLS; j++)
      check(col_img[j] == NIMG && col_cnt[j] == 0, $sformatf("column %0d incomplete", j));
    check(n_stall > 0, "no input stall");
    check(n_rflush > 0, "no row flush");
    check(n_cflush > 0, "no column flush");
    check(back_to_back, "no back-to-back images");
    check(n_early > 0, "column pass never overlapped the row pass");
    for (int s = 0; s < 4; s++) check(n_sub[s] == NIMG * ROWS * COLS / 4, $sformatf("subband %0d count %0d", s, n_sub[s]));
    $display("mechanisms: stalls=%0d row_flush=%0d col_flush=%0d early=%0d LL=%0d HL=%0d LH=%0d HH=%0d",
             n_stall, n_rflush, n_cflush, n_early, n_sub[0], n_sub[1], n_sub[2], n_sub[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
