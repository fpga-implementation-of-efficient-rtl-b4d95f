// dwt_adder_tree -- product registers and pipelined sum of the five
// coefficient products, with rounding to the output width.
//
//   stage 1: the five products from the multipliers are registered, so the
//            multiplier is the only logic between two registers on that path
//   stage 2: partial sums p0+p1, p2+p3 and p4 + 1/2 LSB (rounding constant)
//   stage 3: final sum, arithmetic shift right by COEF_FRAC (round half up),
//            truncated to OUT_W bits
// Latency is three clocks from in_valid to out_valid, one result per clock.
// The side flags (high-pass/low-pass, end of frame) and the side-band word
// in_tag travel with the data. Pipelining so that the multiplier alone sets
// the critical path follows the architecture; the split into two adder
// levels and the rounding are this design's choices.
module dwt_adder_tree
  import dwt97_pkg::*;
#(
  parameter int P_W       = 31,
  parameter int COEF_FRAC = 12,
  parameter int OUT_W     = 18,
  parameter int TAG_W     = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_high,
  input  logic                    in_last,
  input  logic [TAG_W-1:0]        in_tag,
  input  logic signed [P_W-1:0]   prod [NGRP],
  output logic                    out_valid,
  output logic                    out_high,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] out_data,
  output logic [TAG_W-1:0]        out_tag
);

  localparam int S_W = P_W + 3;
  localparam logic signed [S_W-1:0] HALF = S_W'(1) <<< (COEF_FRAC - 1);

  logic signed [P_W-1:0] p_q [NGRP];
  logic signed [S_W-1:0] s01_q, s23_q, s4_q;
  logic signed [S_W-1:0] total;
  logic [2:0] v_q, h_q, l_q;
  logic [TAG_W-1:0] t_q [3];

  assign total = s01_q + s23_q + s4_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NGRP; k++) p_q[k] <= '0;
      s01_q    <= '0;
      s23_q    <= '0;
      s4_q     <= '0;
      out_data <= '0;
      v_q      <= '0;
      h_q      <= '0;
      l_q      <= '0;
      for (int i = 0; i < 3; i++) t_q[i] <= '0;
    end else begin
      v_q <= {v_q[1:0], in_valid};
      h_q <= {h_q[1:0], in_high};
      l_q <= {l_q[1:0], in_last};
      t_q[0] <= in_tag;
      t_q[1] <= t_q[0];
      t_q[2] <= t_q[1];
      if (in_valid)
        for (int k = 0; k < NGRP; k++) p_q[k] <= prod[k];
      if (v_q[0]) begin
        s01_q <= S_W'(p_q[0]) + S_W'(p_q[1]);
        s23_q <= S_W'(p_q[2]) + S_W'(p_q[3]);
        s4_q  <= S_W'(p_q[4]) + HALF;
      end
      if (v_q[1])
        out_data <= OUT_W'(total >>> COEF_FRAC);
    end
  end

  assign out_valid = v_q[2];
  assign out_high  = h_q[2];
  assign out_last  = l_q[2];
  assign out_tag   = t_q[2];

endmodule
