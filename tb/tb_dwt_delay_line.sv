// tb_dwt_delay_line -- checks the nine-slot delay line against a queue
// model: random data and tags shifted in with random shift enables, every
// slot compared each cycle, the `fresh` flag, and the empty state after reset.
module tb_dwt_delay_line;
  import dwt97_pkg::*;

  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0, fresh;
  logic signed [W-1:0] in_data = '0;
  tap_meta_t in_meta = '0;
  logic signed [W-1:0] tap_data [NTAPS];
  tap_meta_t tap_meta [NTAPS];
  int checks = 0, failures = 0;

  dwt_delay_line #(.W(W)) dut (.*);

  always #5 clk = !clk;

  logic signed [W-1:0] m_data [NTAPS];
  tap_meta_t m_meta [NTAPS];
  bit m_fresh;

  initial begin
    for (int i = 0; i < NTAPS; i++) begin m_data[i] = '0; m_meta[i] = '0; end
    m_fresh = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (400) begin
      @(negedge clk);
      for (int i = 0; i < NTAPS; i++) begin
        checks++;
        if (tap_data[i] !== m_data[i] || tap_meta[i] !== m_meta[i]) begin
          failures++;
          if (failures < 10) $display("FAIL: slot %0d got %0d expected %0d", i, tap_data[i], m_data[i]);
        end
      end
      checks++;
      if (fresh !== m_fresh) begin failures++; $display("FAIL: fresh"); end
      shift_en = ($urandom_range(0, 3) != 0);
      in_data  = $signed(W'($urandom));
      in_meta  = tap_meta_t'($urandom);
      m_fresh  = shift_en;
      if (shift_en) begin
        for (int i = NTAPS - 1; i > 0; i--) begin m_data[i] = m_data[i-1]; m_meta[i] = m_meta[i-1]; end
        m_data[0] = in_data;
        m_meta[0] = in_meta;
      end
    end
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
