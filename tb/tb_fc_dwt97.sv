// tb_fc_dwt97 -- end-to-end test of the fast-convolution (9,7) DWT at its
// default parameters, one full 256 x 256 image pass (256 rows of 256
// samples each, every row one frame).
//
// Reference: each output is recomputed straight from the zero-padded filter
// equations y_L(n) = sum_k h|k| x[2n+k] (k = -4..4) and
// y_H(n) = sum_k g|k| x[2n-1+k] (k = -3..3), with the coefficient values
// written below as literals (rounded to 2^-12 and cut to four signed
// power-of-two terms), rounded half up. Every output is also held against
// the exact real-valued filters within a tolerance that bounds the
// coefficient approximation error.
//
// Timing check: the output of the window whose key sample (one newer than
// the centre) is x[j] must be loaded into the output register by the 4th
// clock edge after the edge of the third window shift that follows the
// acceptance of x[j].
//
// Rows are sent in different ways so that every mechanism happens: rows
// back to back with no gap (the next row pushes the previous tail out),
// rows followed by idle cycles (tail flush, complete or ended after one or
// two cycles by a row that then stalls), rows with random input gaps
// (stalls), and rows of full-scale 16-bit data (largest filter gain).
module tb_fc_dwt97;
  import dwt97_pkg::*;

  localparam int IN_W   = 16;
  localparam int OUT_W  = IN_W + 2;
  localparam int N      = 256;
  localparam int ROWS   = 256;
  localparam int FRAC   = 12;
  localparam int WATCHDOG = 200000;
  // the output register is loaded by the 4th edge after the accepting edge,
  // so out_valid is seen at the 5th
  localparam int LAT = 5;

  localparam int HQ [5] = '{2464, 1093, -320, -69, 110};
  localparam int GQ [5] = '{4568, -2424, -236, 374, 0};
  localparam real HR [5] = '{0.602949018236, 0.266864118443, -0.078223266529,
                             -0.016864118443, 0.026748757411};
  localparam real GR [5] = '{1.115087052457, -0.591271763114, -0.057543526229,
                             0.091271763114, 0.0};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_last = 1'b0;
  logic signed [IN_W-1:0] in_data = '0;
  logic out_valid, out_high, out_last, flushing;
  logic signed [OUT_W-1:0] out_data;

  fc_dwt97 dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // stored stimulus
  int  xs    [ROWS][N];
  longint shift_cycle [$];
  int  samp_shift [ROWS][N];      // global shift index of each sample
  int  in_row = 0, in_idx = 0;
  int  out_row = 0, out_idx = 0;

  // mechanism counters
  int n_stall = 0, n_flush = 0, n_b2b = 0, n_low = 0, n_high = 0;
  int n_alt = 0, n_boundary = 0, n_last = 0, n_fullscale = 0;
  logic prev_high = 1'b1;
  bit   prev_valid_out = 0;

  function automatic int xat(int r, int i);
    return (i < 0 || i >= N) ? 0 : xs[r][i];
  endfunction

  function automatic longint ref_q(int r, int j);
    longint acc = 0;
    if (j % 2 == 0) begin   // high-pass, centre x[j-1]
      for (int k = -3; k <= 3; k++) acc += longint'(GQ[k < 0 ? -k : k]) * xat(r, j - 1 + k);
    end else begin          // low-pass, centre x[j-1]
      for (int k = -4; k <= 4; k++) acc += longint'(HQ[k < 0 ? -k : k]) * xat(r, j - 1 + k);
    end
    return (acc + (longint'(1) << (FRAC - 1))) >>> FRAC;
  endfunction

  function automatic real ref_r(int r, int j);
    real acc = 0.0;
    if (j % 2 == 0) begin
      for (int k = -3; k <= 3; k++) acc += GR[k < 0 ? -k : k] * xat(r, j - 1 + k);
    end else begin
      for (int k = -4; k <= 4; k++) acc += HR[k < 0 ? -k : k] * xat(r, j - 1 + k);
    end
    return acc;
  endfunction

  function automatic real max_abs_row(int r);
    real m = 0.0;
    for (int i = 0; i < N; i++) if ((xs[r][i] < 0 ? -xs[r][i] : xs[r][i]) > m) m = (xs[r][i] < 0 ? -xs[r][i] : xs[r][i]);
    return m;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // stimulus data
  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < N; i++) begin
        if (r % 16 == 5)        xs[r][i] = (i % 2 == 0) ? 32767 : -32768;   // full-scale, Nyquist
        else if (r % 16 == 9)   xs[r][i] = int'($signed(16'($urandom)));         // full-scale random
        else                    xs[r][i] = int'($urandom_range(0, 255));      // 8-bit pixels
      end
  end

  // cycle counter, shift bookkeeping and output checker (one process, so
  // that all three see the same cycle number)
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid || flushing) shift_cycle.push_back(cycle);
      if (in_valid) begin
        samp_shift[in_row][in_idx] = shift_cycle.size() - 1;
        in_idx++;
        if (in_idx == N) begin in_idx = 0; in_row++; end
      end
      if (flushing) n_flush++;
    end
    if (rst_n && out_valid) begin
      int j;
      longint exp_q;
      real    exp_r, tol;
      int     sidx;
      j = out_idx;
      if (out_row >= ROWS) begin
        check(0, "output beyond the last row");
      end else begin
        exp_q = ref_q(out_row, j);
        exp_r = ref_r(out_row, j);
        // |coefficient error| <= 2^-8 per tap (bounds the 4-term approximation)
        tol = 9.0 * max_abs_row(out_row) / 256.0 + 1.0;
        check(longint'(out_data) == exp_q,
              $sformatf("row %0d out %0d: got %0d expected %0d", out_row, j, out_data, exp_q));
        check((real'(out_data) - exp_r) <= tol && (exp_r - real'(out_data)) <= tol,
              $sformatf("row %0d out %0d: %0d too far from %f", out_row, j, out_data, exp_r));
        check(out_high == (j % 2 == 0), $sformatf("row %0d out %0d: band flag", out_row, j));
        check(out_last == (j == N - 1), $sformatf("row %0d out %0d: last flag", out_row, j));
        sidx = samp_shift[out_row][j] + 3;
        check(sidx < shift_cycle.size() && cycle == shift_cycle[sidx] + longint'(LAT),
              $sformatf("row %0d out %0d: at cycle %0d, window shift at %0d", out_row, j, cycle,
                        sidx < shift_cycle.size() ? shift_cycle[sidx] : -1));
        if (out_high) n_high++; else n_low++;
        if (prev_valid_out && out_high != prev_high) n_alt++;
        if (j < 4 || j >= N - 4) n_boundary++;
        if (out_last) n_last++;
        if (out_row % 16 == 5 || out_row % 16 == 9) n_fullscale++;
        prev_high = out_high;
        out_idx++;
        if (out_idx == N) begin out_idx = 0; out_row++; end
      end
    end
    prev_valid_out = rst_n && out_valid;
    cycle++;
  end

  task automatic send(int r, int i);
    in_valid <= 1'b1;
    in_data  <= IN_W'(xs[r][i]);
    in_last  <= (i == N - 1);
    @(posedge clk);
  endtask

  task automatic idle(int n);
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < ROWS; r++) begin
      int mode;
      mode = r % 4;
      for (int i = 0; i < N; i++) begin
        if (mode != 1 && $urandom_range(0, 5) == 0) begin
          idle($urandom_range(1, 3));
          n_stall++;
        end
        send(r, i);
      end
      if (mode == 0 || mode == 2) n_b2b++;          // next row follows at once
      else idle(mode == 1 ? 10 : $urandom_range(1, 2)); // tail flush, full or cut short
    end
    idle(20);
    check(out_row == ROWS, $sformatf("only %0d rows came out", out_row));
    check(n_stall > 0,     "no stall happened");
    check(n_flush > 0,     "no tail flush happened");
    check(n_b2b > 0,       "no back-to-back rows");
    check(n_low == ROWS * N / 2 && n_high == ROWS * N / 2, "band counts");
    check(n_alt > 0,       "bands never alternated");
    check(n_boundary > 0,  "no boundary outputs");
    check(n_last == ROWS,  "last-flag count");
    check(n_fullscale > 0, "no full-scale rows");
    $display("mechanisms: stalls=%0d flush_cycles=%0d back_to_back=%0d low=%0d high=%0d alternations=%0d boundary=%0d fullscale=%0d",
             n_stall, n_flush, n_b2b, n_low, n_high, n_alt, n_boundary, n_fullscale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
