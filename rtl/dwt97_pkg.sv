// dwt97_pkg -- shared types, constants and coefficient arithmetic of the
// fast-convolution (9,7) DWT.
//
// The (9,7) analysis filters are symmetric, so each filter is described by
// the coefficients of one half: H_REF[k] is the low-pass tap at distance k
// from the centre (k = 0..4), G_REF[k] the high-pass tap at distance k
// (k = 0..3; a fifth, zero entry lets both filters share the five pre-added
// tap pairs), both held in units of 2^-30. The values are the usual JPEG2000 irreversible (9,7) analysis
// filters (low-pass DC gain 1, high-pass Nyquist gain 2); the sizes and the
// symmetry follow the architecture, the numbers themselves are this design's
// choice.
//
// Constant multiplication is done without multipliers: each coefficient is
// rounded to COEF_FRAC fractional bits, recoded into canonical signed digits
// (CSD) and then approximated by keeping only its CSD_TERMS most significant
// non-zero digits. csd_approx() does this at elaboration time and returns a
// pair of digit masks (positive digits, negative digits) that the shift-add
// multiplier csd_mult consumes.
package dwt97_pkg;

  // Number of pre-added tap groups: the centre tap plus four symmetric pairs.
  localparam int NGRP = 5;
  // Delay line length: the longer (low-pass) filter has nine taps.
  localparam int NTAPS = 9;
  // Index of the tap whose sample parity selects the filter of a window
  // (the tap one position newer than the centre, see dwt_preadd).
  localparam int KEY_TAP = 3;
  localparam int CENTER_TAP = 4;

  // Widest CSD digit vector supported (COEF_FRAC up to CSD_W-3).
  localparam int CSD_W = 16;

  // Filter taps in units of 2^-30 (reference precision):
  //   h0..h4 = 0.602949018236, 0.266864118443, -0.078223266529,
  //            -0.016864118443, 0.026748757411
  //   g0..g3 = 1.115087052457, -0.591271763114, -0.057543526229,
  //            0.091271763114 (g4 = 0)
  localparam int REF_FRAC = 30;
  localparam longint H_REF [NGRP] = '{647411579, 286543165, -83991593, -18107709, 28721260};
  localparam longint G_REF [NGRP] = '{1197315606, -634873221, -61786891, 98002309, 0};

  // One coefficient as CSD digit masks: bit i of pos (neg) set means a
  // +2^i (-2^i) term, in units of 2^-COEF_FRAC.
  typedef struct packed {
    logic [CSD_W-1:0] pos;
    logic [CSD_W-1:0] neg;
  } csd_t;

  // Per-sample bookkeeping carried next to the data through the delay line.
  typedef struct packed {
    logic valid;   // slot holds a real sample (not a flush bubble)
    logic frame;   // frame tag, toggles from one frame to the next
    logic odd;     // sample index within its frame is odd
    logic last;    // last sample of its frame
  } tap_meta_t;

  // Reference tap (units of 2^-REF_FRAC) rounded to `frac` fractional bits,
  // round half up.
  function automatic int quantize(longint c, int frac);
    return int'((c + (longint'(1) <<< (REF_FRAC - frac - 1))) >>> (REF_FRAC - frac));
  endfunction

  // CSD recoding of `value`, truncated to its `terms` most significant
  // non-zero digits (terms <= 0 keeps them all).
  function automatic csd_t csd_approx(int value, int terms);
    csd_t full, res;
    int   v, kept;
    v    = value;
    full = '0;
    for (int i = 0; i < CSD_W; i++) begin
      if (v % 2 != 0) begin
        // digit is +1 when v = 1 (mod 4), -1 when v = 3 (mod 4)
        if (((v % 4) + 4) % 4 == 1) begin
          full.pos[i] = 1'b1;
          v = v - 1;
        end else begin
          full.neg[i] = 1'b1;
          v = v + 1;
        end
      end
      v = v / 2;
    end
    res  = '0;
    kept = 0;
    for (int i = CSD_W - 1; i >= 0; i--) begin
      if ((full.pos[i] || full.neg[i]) && (terms <= 0 || kept < terms)) begin
        res.pos[i] = full.pos[i];
        res.neg[i] = full.neg[i];
        kept++;
      end
    end
    return res;
  endfunction

  // Integer value of a CSD coefficient (used for checks and documentation).
  function automatic int csd_value(csd_t c);
    int s;
    s = 0;
    for (int i = 0; i < CSD_W; i++) begin
      if (c.pos[i]) s += (1 << i);
      if (c.neg[i]) s -= (1 << i);
    end
    return s;
  endfunction

endpackage
