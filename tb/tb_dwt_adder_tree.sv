// tb_dwt_adder_tree -- checks the product registers and adder tree: random
// products (some at the extremes of their range) fed one per cycle with
// random gaps; each result must equal round-half-up(sum / 2^12) and appear
// exactly three clocks after its inputs, with its flags and side-band tag.
module tb_dwt_adder_tree;
  import dwt97_pkg::*;

  localparam int P_W = 31, FRAC = 12, OUT_W = 18;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_high = 1'b0, in_last = 1'b0;
  logic signed [P_W-1:0] prod [NGRP];
  logic out_valid, out_high, out_last;
  logic [7:0] in_tag = '0, out_tag;
  logic signed [OUT_W-1:0] out_data;
  int checks = 0, failures = 0;

  dwt_adder_tree #(.P_W(P_W), .COEF_FRAC(FRAC), .OUT_W(OUT_W), .TAG_W(8)) dut (.*);

  always #5 clk = !clk;

  typedef struct { longint y; bit h; bit l; longint t; logic [7:0] g; } exp_t;
  exp_t q [$];
  longint cycle = 0;
  int n_out = 0;

  always @(posedge clk) begin
    cycle++;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
      else begin
        e = q.pop_front();
        if (longint'(out_data) != e.y || out_high != e.h || out_last != e.l || out_tag != e.g || cycle != e.t + 3) begin
          failures++;
          if (failures < 10) $display("FAIL: got %0d expected %0d (cycle %0d vs %0d)", out_data, e.y, cycle, e.t + 3);
        end
        n_out++;
      end
    end
  end

  initial begin
    for (int k = 0; k < NGRP; k++) prod[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (600) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_high  = 1'($urandom_range(0, 1));
      in_last  = 1'($urandom_range(0, 1));
      in_tag   = 8'($urandom);
      begin
        longint s;
        s = 0;
        for (int k = 0; k < NGRP; k++) begin
          // keep the sum within the output range: |prod| < 2^(OUT_W-1+FRAC)/5
          longint lim;
          lim = ((longint'(1) << (OUT_W - 1 + FRAC)) - (longint'(1) << FRAC)) / 5;
          case ($urandom_range(0, 4))
            0:       prod[k] = P_W'(lim);
            1:       prod[k] = P_W'(-lim);
            default: prod[k] = P_W'(longint'($urandom_range(0, 2 * 32'(lim))) - lim);
          endcase
          s += longint'(prod[k]);
        end
        if (in_valid) q.push_back('{y: (s + (longint'(1) << (FRAC - 1))) >>> FRAC,
                                    h: in_high, l: in_last, t: cycle + 1, g: in_tag});
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_out < 100) begin failures++; $display("FAIL: %0d outputs missing", q.size()); end
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
