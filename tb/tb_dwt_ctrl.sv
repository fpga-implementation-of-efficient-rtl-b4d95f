// tb_dwt_ctrl -- checks the input sequencer against a small model: the tags
// given to each sample (index parity restarting at every frame, frame tag
// toggling after each last sample, end-of-frame flag), that exactly three
// bubbles are shifted in after a frame when no sample follows, that a flush
// is ended by the next frame's first sample (no bubble may enter a frame
// that stalls early), and that nothing shifts when idle.
module tb_dwt_ctrl;
  import dwt97_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_last = 1'b0;
  logic shift_en, flushing;
  tap_meta_t new_meta;
  int checks = 0, failures = 0;

  dwt_ctrl dut (.*);

  always #5 clk = !clk;

  // model
  bit m_frame = 0, m_odd = 0;
  int m_pending = 0;
  int n_flush = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s at %0t", what, $time); end
  endtask

  // compare every cycle just before the edge, then step the model
  always @(negedge clk) if (rst_n) begin
    bit exp_shift;
    exp_shift = in_valid || (m_pending != 0);
    check(shift_en == exp_shift, "shift_en");
    check(flushing == (!in_valid && m_pending != 0), "flushing");
    if (in_valid) begin
      check(new_meta.valid && new_meta.frame == m_frame && new_meta.odd == m_odd
            && new_meta.last == in_last, "sample tags");
    end else begin
      check(new_meta == '0, "bubble tags");
    end
    if (flushing) n_flush++;
    if (in_valid) begin
      m_odd = in_last ? 0 : !m_odd;
      if (in_last) m_frame = !m_frame;
    end
    if (in_valid) m_pending = in_last ? 3 : 0;
    else if (m_pending != 0) m_pending--;
  end

  task automatic frame(int len, int gap_after, bit stalls);
    for (int i = 0; i < len; i++) begin
      if (stalls && $urandom_range(0, 3) == 0) begin
        @(posedge clk) begin in_valid <= 0; in_last <= 0; end
      end
      @(posedge clk) begin in_valid <= 1; in_last <= (i == len - 1); end
    end
    repeat (gap_after) @(posedge clk) begin in_valid <= 0; in_last <= 0; end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    frame(8, 6, 0);     // full flush
    frame(6, 0, 0);     // back to back
    frame(10, 1, 1);    // flush cut short, stalls
    frame(4, 2, 0);
    frame(2, 0, 0);     // shorter than the flush
    frame(12, 1, 0);    // flush cut short ...
    frame(9, 2, 1);     // ... by a frame that stalls
    frame(10, 1, 0);    // flush cut short by one sample, then a stall
    @(posedge clk) begin in_valid <= 1; in_last <= 0; end
    repeat (2) @(posedge clk) begin in_valid <= 0; in_last <= 0; end
    frame(7, 5, 0);
    frame(12, 8, 1);
    repeat (4) @(posedge clk);
    check(n_flush >= 6, "flush cycles seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
