// csd_mult -- multiplier-less coefficient multiplier (shift and add).
//
// Multiplies the signed operand x by a coefficient given as canonical signed
// digit masks: p = sum_i (pos[i] - neg[i]) * (x << i). The coefficient is in
// units of 2^-COEF_FRAC, so p carries COEF_FRAC fractional bits. Only digits
// 0..COEF_FRAC+1 are used, which covers every coefficient of magnitude below
// two. Because the coefficient arrives from a register that alternates
// between two constant sets, each digit position reduces to a small
// add/subtract/skip choice instead of a full array multiplier.
//
// Purely combinational; the product register sits in dwt_adder_tree, so the
// critical path of the DWT is this shift-add network. Multiplier-less
// approximated constants follow the architecture; the CSD form is this
// design's choice of approximation.
module csd_mult
  import dwt97_pkg::*;
#(
  parameter int IN_W      = 17,
  parameter int COEF_FRAC = 12,
  localparam int P_W      = IN_W + COEF_FRAC + 2
) (
  input  logic signed [IN_W-1:0] x,
  input  csd_t                   c,
  output logic signed [P_W-1:0]  p
);

  localparam int NDIG = COEF_FRAC + 2;

  logic signed [P_W-1:0] xe;
  assign xe = P_W'(x);

  always_comb begin
    p = '0;
    for (int i = 0; i < NDIG; i++) begin
      if (c.pos[i]) p = p + (xe <<< i);
      if (c.neg[i]) p = p - (xe <<< i);
    end
  end

endmodule
