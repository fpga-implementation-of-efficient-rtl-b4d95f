// tb_csd_mult -- checks the shift-add multiplier against plain integer
// multiplication: the (9,7) coefficient values (as signed-digit masks written
// out by hand), random digit masks and random / extreme operands.
module tb_csd_mult;
  import dwt97_pkg::*;

  localparam int IN_W = 17;
  localparam int FRAC = 12;
  localparam int P_W  = IN_W + FRAC + 2;

  logic signed [IN_W-1:0] x;
  csd_t                   c;
  logic signed [P_W-1:0]  p;
  int checks = 0, failures = 0;

  csd_mult #(.IN_W(IN_W), .COEF_FRAC(FRAC)) dut (.x, .c, .p);

  // hand-written masks: value = sum pos - sum neg
  localparam int NK = 4;
  localparam logic [15:0] KPOS [NK] = '{16'b0000_1010_0010_0000,  // 2464 = 2048+512-128+32
                                        16'b0001_0010_0000_0000,  // 4568 = 4096+512-32-8
                                        16'b0000_0000_1000_0000,  // 110 = 128-16-2
                                        16'b0000_0010_0000_0000}; // 374 = 512-128-8-2
  localparam logic [15:0] KNEG [NK] = '{16'b0000_0000_1000_0000,
                                        16'b0000_0000_0010_1000,
                                        16'b0000_0000_0001_0010,
                                        16'b0000_0000_1000_1010};
  localparam int KVAL [NK] = '{2464, 4568, 110, 374};

  task automatic run(int val);
    #1;
    checks++;
    if (longint'(p) != longint'(x) * val) begin
      failures++;
      if (failures < 10) $display("FAIL: x=%0d coef=%0d p=%0d", x, val, p);
    end
  endtask

  initial begin
    for (int k = 0; k < NK; k++) begin
      c.pos = KPOS[k]; c.neg = KNEG[k];
      x = -17'sd65536; run(KVAL[k]);
      x =  17'sd65535; run(KVAL[k]);
      repeat (50) begin x = $signed(17'($urandom)); run(KVAL[k]); end
      // same magnitude, negated coefficient
      c.pos = KNEG[k]; c.neg = KPOS[k];
      repeat (20) begin x = $signed(17'($urandom)); run(-KVAL[k]); end
    end
    // random non-overlapping masks over the 14 used digits
    repeat (500) begin
      logic [15:0] a, b;
      int v;
      a = 16'($urandom) & 16'h3fff;
      b = 16'($urandom) & 16'h3fff & ~a;
      c.pos = a; c.neg = b;
      v = int'(a) - int'(b);
      x = $signed(17'($urandom));
      run(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
