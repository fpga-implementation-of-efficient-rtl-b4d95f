// tb_dwt_preadd -- checks the symmetric pre-adders with random windows: each
// tap is random data with random validity and frame tag; the expected sums
// treat a tap as zero unless it is valid and of the key tap's frame. Also
// checks the band flag (even key sample -> high-pass), the end-of-frame flag,
// the side-band tag,
// that a stale window (fresh = 0) or an empty key tap gives no output, and
// extreme values (no overflow of the W+1 bit sums).
module tb_dwt_preadd;
  import dwt97_pkg::*;

  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, fresh = 1'b0;
  logic signed [W-1:0] tap_data [NTAPS];
  tap_meta_t tap_meta [NTAPS];
  logic signed [W:0] grp_sum [NGRP];
  logic out_valid, out_high, out_last;
  logic [7:0] in_tag = '0, out_tag;
  int checks = 0, failures = 0;

  dwt_preadd #(.W(W), .TAG_W(8)) dut (.*);

  always #5 clk = !clk;

  function automatic int tapv(int i);
    if (tap_meta[i].valid && tap_meta[i].frame == tap_meta[KEY_TAP].frame) return int'(tap_data[i]);
    return 0;
  endfunction

  initial begin
    int e [NGRP];
    bit exp_v, exp_h, exp_l;
    logic [7:0] exp_t;
    for (int i = 0; i < NTAPS; i++) begin tap_data[i] = '0; tap_meta[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (500) begin
      @(negedge clk);
      fresh = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < NTAPS; i++) begin
        case ($urandom_range(0, 5))
          0:       tap_data[i] = 16'sh7fff;
          1:       tap_data[i] = -16'sh8000;
          default: tap_data[i] = $signed(W'($urandom));
        endcase
        tap_meta[i] = tap_meta_t'($urandom);
        if ($urandom_range(0, 3) != 0) tap_meta[i].frame = 0;  // mostly one frame
      end
      if ($urandom_range(0, 5) != 0) tap_meta[KEY_TAP].valid = 1;
      e[0] = tapv(4);
      for (int k = 1; k < NGRP; k++) e[k] = tapv(4 - k) + tapv(4 + k);
      exp_v = fresh && tap_meta[KEY_TAP].valid;
      exp_h = !tap_meta[KEY_TAP].odd;
      exp_l = tap_meta[KEY_TAP].last;
      in_tag = 8'($urandom);
      exp_t = in_tag;
      @(posedge clk); #1;
      checks++;
      if (out_valid != exp_v) begin failures++; $display("FAIL: valid"); end
      if (exp_v) begin
        checks++;
        if (out_high != exp_h || out_last != exp_l || out_tag != exp_t) begin failures++; $display("FAIL: flags"); end
        for (int k = 0; k < NGRP; k++) begin
          checks++;
          if (int'(grp_sum[k]) != e[k]) begin
            failures++;
            if (failures < 10) $display("FAIL: group %0d got %0d expected %0d", k, grp_sum[k], e[k]);
          end
        end
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
