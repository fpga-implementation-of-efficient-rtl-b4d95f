// tb_dwt_col_ctrl -- checks the column-pass sequencer on a small image
// (8 columns x 6 rows) against a cycle model: column address and tags of
// every row-pass value (row parity, image tag, last row), bubbles only in
// idle cycles and only into columns still owed, exactly three bubbles per
// column after an image when the input stays idle, and no bubble into a
// column that the next image has already reached.
module tb_dwt_col_ctrl;
  import dwt97_pkg::*;

  localparam int COLS = 8, ROWS = 6, AW = 3;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic shift_en, flushing;
  logic [AW-1:0] addr;
  tap_meta_t new_meta;
  int checks = 0, failures = 0;

  dwt_col_ctrl #(.COLS(COLS), .ROWS(ROWS)) dut (.*);

  always #5 clk = !clk;

  // model
  int m_col = 0, m_row = 0, m_scan = 0;
  bit m_img = 0;
  int m_owed [COLS];
  int bubbles [COLS];       // bubbles into each column since its image ended
  bit reached [COLS];       // next image has reached the column
  int n_bubble = 0, n_cut = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s at %0t", what, $time); end
  endtask

  function automatic int total_owed();
    int s = 0;
    for (int c = 0; c < COLS; c++) s += m_owed[c];
    return s;
  endfunction

  always @(negedge clk) if (rst_n) begin
    bit exp_bubble;
    exp_bubble = !in_valid && total_owed() != 0 && m_owed[m_scan] != 0;
    check(shift_en == (in_valid || exp_bubble), "shift_en");
    check(flushing == exp_bubble, "flushing");
    if (in_valid) begin
      check(int'(addr) == m_col, "sample address");
      check(new_meta.valid && new_meta.frame == m_img && new_meta.odd == m_row[0]
            && new_meta.last == (m_row == ROWS - 1), "sample tags");
      reached[m_col] = 1;
      if (m_col == COLS - 1 && m_row == ROWS - 1) begin
        m_img = !m_img;
        for (int c = 0; c < COLS; c++) begin m_owed[c] = 3; bubbles[c] = 0; reached[c] = 0; end
      end else if (m_owed[m_col] != 0) begin
        m_owed[m_col] = 0;
        n_cut++;
      end
      if (m_col == COLS - 1) begin m_col = 0; m_row = (m_row == ROWS - 1) ? 0 : m_row + 1; end
      else m_col++;
    end else begin
      if (exp_bubble) begin
        check(int'(addr) == m_scan && new_meta == '0, "bubble address/tags");
        check(!reached[m_scan], "bubble into a column the next image reached");
        m_owed[m_scan]--;
        bubbles[m_scan]++;
        n_bubble++;
      end
      if (total_owed() != 0 || exp_bubble) m_scan = (m_scan + 1) % COLS;
    end
  end

  task automatic image(int gap_prob);
    for (int i = 0; i < ROWS * COLS; i++) begin
      if (gap_prob > 0 && $urandom_range(0, gap_prob) == 0) begin
        @(posedge clk) in_valid <= 0;
      end
      @(posedge clk) in_valid <= 1;
    end
  endtask

  initial begin
    for (int c = 0; c < COLS; c++) begin m_owed[c] = 0; bubbles[c] = 0; reached[c] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    image(3);
    @(posedge clk) in_valid <= 0;
    repeat (40) @(posedge clk);
    for (int c = 0; c < COLS; c++) check(bubbles[c] == 3, $sformatf("column %0d got %0d bubbles", c, bubbles[c]));
    image(0);
    image(4);                       // back to back
    @(posedge clk) in_valid <= 0;
    repeat (5) @(posedge clk);      // flush only begun
    image(2);
    @(posedge clk) in_valid <= 0;
    repeat (40) @(posedge clk);
    check(n_bubble > 24 && n_cut > 0, "bubbles and cut-short flushes seen");
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
