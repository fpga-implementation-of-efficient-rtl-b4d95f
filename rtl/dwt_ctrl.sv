// dwt_ctrl -- input sequencing for the fast-convolution (9,7) DWT.
//
// Tags every accepted sample with its bookkeeping (tap_meta_t): the parity of
// its index inside the frame (which decides whether the window it completes
// yields a low-pass or a high-pass output), a frame tag that toggles after
// each frame (so the pre-adders can treat samples of a neighbouring frame as
// the zero padding of the filter equations) and its end-of-frame flag.
//
// The delay line shifts on every accepted sample. After the last sample of a
// frame the last KEY_TAP (3) outputs still need the window to move on; if no
// new sample arrives, the controller shifts in empty bubbles until those
// outputs are out ("tail flush"). A new frame may follow the last sample of
// the previous one at any time, even in the very next cycle: its first
// sample ends the flush and its following samples push the rest of the
// previous frame's tail out, so back-to-back frames run at one output per
// clock with no gap. Frames must be at least 5 samples long (a window spans
// parts of at most three frames, told apart by a one-bit tag).
//
// Interface: in_valid/in_last qualify the incoming sample (there is no back
// pressure; a sample is accepted every cycle in_valid is high). shift_en and
// new_meta go to the delay line in the same cycle. flushing is high while
// bubbles are being inserted. Reset is asynchronous and active low.
// The tag scheme and the flush are this design's choices; the architecture gives
// only the zero-padded boundary equations.
module dwt_ctrl
  import dwt97_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic      in_last,
  output logic      shift_en,
  output tap_meta_t new_meta,
  output logic      flushing
);

  localparam int FLUSH = KEY_TAP;

  logic       frame_q;
  logic       odd_q;
  logic [1:0] pending_q;

  assign flushing = !in_valid && (pending_q != 2'd0);
  assign shift_en = in_valid || (pending_q != 2'd0);

  always_comb begin
    new_meta = '0;
    if (in_valid) begin
      new_meta.valid = 1'b1;
      new_meta.frame = frame_q;
      new_meta.odd   = odd_q;
      new_meta.last  = in_last;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q   <= 1'b0;
      odd_q     <= 1'b0;
      pending_q <= '0;
    end else begin
      if (in_valid) begin
        odd_q <= in_last ? 1'b0 : !odd_q;
        if (in_last) frame_q <= !frame_q;
      end
      // a sample of the next frame ends the flush: that frame's own samples
      // push the rest of the tail out, so no bubble may enter between them
      if (in_valid)
        pending_q <= in_last ? 2'(FLUSH) : 2'd0;
      else if (pending_q != 2'd0)
        pending_q <= pending_q - 2'd1;
    end
  end

endmodule
