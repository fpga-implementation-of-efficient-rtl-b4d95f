// fc_dwt97 -- fast-convolution one-dimensional (9,7) discrete wavelet
// transform.
//
// A stream of signed samples x[0..N-1] (one frame, e.g. one image row) is
// split into the low-pass band y_L(n) (9-tap filter h centred on x[2n]) and
// the high-pass band y_H(n) (7-tap filter g centred on x[2n-1]), each of
// N/2 samples, with samples outside the frame taken as zero. Instead of two
// filters that each compute at the output rate and discard every second
// result, a single datapath computes the two bands alternately:
//
//   dwt_ctrl -> dwt_delay_line -> dwt97_datapath:
//                                   dwt_preadd ---> 5 x csd_mult -> dwt_adder_tree
//                                   dwt_coef_reg -/
//
// Every accepted sample moves the 9-tap window by one. Windows alternate
// between a high-pass centre (odd sample) and a low-pass centre (even
// sample); the symmetric pre-adders fold the window into five sums, the
// coefficient registers supply g or h for that window, five multiplier-less
// shift-add multipliers form the products and a pipelined adder tree sums
// and rounds them. So the five multipliers serve both filters and one output
// leaves per clock: y_H(0), y_L(0), y_H(1), y_L(1), ...
//
// Interface: in_valid/in_data/in_last (in_last marks the frame's last sample;
// frames may be of any length and may follow each other without a gap; no
// back pressure). out_valid/out_data/out_high (1 = y_H, 0 = y_L)/out_last
// (last output of a frame, y_L(N/2-1) for even N). flushing is high in a
// cycle in which the window advances by an empty bubble (tail flush). Output order is
// y_H(0), y_L(0), ..., y_H(N/2-1), y_L(N/2-1).
//
// Timing: y_H(n) is loaded into the output register by the 4th clock edge
// after the edge that accepted x[2n+3] (y_L(n): after x[2n+4]), so out_valid
// is high in the 5th cycle; the last three outputs of a frame are pushed out by
// the next frame's first samples or, if none come, by three flush cycles.
// Register stages: delay line, pre-add, product, partial sum, output.
//
// Data format: IN_W-bit two's-complement integer in, OUT_W = IN_W+2 bit
// integer out (the outputs are rounded to integers; the largest filter gain
// is about 2.6). The alternation, the shared multipliers, the coefficient
// registers, the pre-added symmetry, the zero boundary and the multiplier-less
// approximated constants follow the architecture; widths, coefficient
// precision, approximation depth, pipeline depth and frame handshake are this
// design's choices.
module fc_dwt97
  import dwt97_pkg::*;
#(
  parameter int IN_W      = 16,
  parameter int COEF_FRAC = 12,
  parameter int CSD_TERMS = 4,
  localparam int OUT_W    = IN_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  input  logic                    in_last,
  output logic                    out_valid,
  output logic                    out_high,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    flushing
);

  logic                   shift_en;
  tap_meta_t              new_meta;
  logic signed [IN_W-1:0] tap_data [NTAPS];
  tap_meta_t              tap_meta [NTAPS];
  logic                   fresh;
  logic                   unused_tag;

  dwt_ctrl u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_last,
    .shift_en, .new_meta, .flushing
  );

  dwt_delay_line #(.W(IN_W)) u_delay (
    .clk, .rst_n,
    .shift_en,
    .in_data,
    .in_meta (new_meta),
    .tap_data, .tap_meta, .fresh
  );

  dwt97_datapath #(.W(IN_W), .COEF_FRAC(COEF_FRAC), .CSD_TERMS(CSD_TERMS)) u_dp (
    .clk, .rst_n,
    .fresh, .tap_data, .tap_meta,
    .in_tag   (1'b0),
    .out_valid, .out_high, .out_last, .out_data,
    .out_tag  (unused_tag)
  );

endmodule
