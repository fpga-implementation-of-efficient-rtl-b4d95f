// dwt_delay_line -- the nine-sample input delay line of the (9,7) DWT.
//
// tap_data[0] holds the newest sample, tap_data[8] the oldest; tap_data[4] is
// the centre of the symmetric filters. Each slot carries its bookkeeping
// (tap_meta_t) next to the data. On a clock edge with shift_en high every
// slot moves one place older and in_data/in_meta enter slot 0. `fresh` is
// high in the cycle after a shift, i.e. while the window differs from the one
// already handed to the pre-adders; one window is therefore consumed per
// accepted sample (or flush bubble). Reset empties every slot (valid = 0),
// which the pre-adders read as zeros. The nine-sample window follows the
// nine-tap low-pass filter of the architecture; the tag bits are this
// design's own addition.
module dwt_delay_line
  import dwt97_pkg::*;
#(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic signed [W-1:0] in_data,
  input  tap_meta_t           in_meta,
  output logic signed [W-1:0] tap_data [NTAPS],
  output tap_meta_t           tap_meta [NTAPS],
  output logic                fresh
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) begin
        tap_data[i] <= '0;
        tap_meta[i] <= '0;
      end
      fresh <= 1'b0;
    end else begin
      fresh <= shift_en;
      if (shift_en) begin
        tap_data[0] <= in_data;
        tap_meta[0] <= in_meta;
        for (int i = 1; i < NTAPS; i++) begin
          tap_data[i] <= tap_data[i-1];
          tap_meta[i] <= tap_meta[i-1];
        end
      end
    end
  end

endmodule
