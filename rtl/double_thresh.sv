// double_thresh: double-threshold classification of the thinned magnitude.
//
// Each magnitude m (compared on the 8-bit threshold scale, m >> 3) is
// classified as in the document: strong if m >= T_high, weak if
// T_low <= m < T_high, none otherwise. In the basic mode the fixed pair
// [T_LOW_FIX T_HIGH_FIX] = [21 52] is used, the hardware threshold pair of the
// document's basic pipeline; in the improved mode the adaptive pair from
// adaptive_thresh is used. The mode and the adaptive pair are sampled at reset
// and after the last pixel of each frame, so a frame is classified with one
// threshold pair throughout (this frame-boundary switching is this design's
// choice). Pointwise: one clock of latency, one pixel per clock.
module double_thresh
  import edge_pkg::*;
#(
  parameter thr_t T_LOW_FIX  = 8'd21,
  parameter thr_t T_HIGH_FIX = 8'd52
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mode_improved,
  input  thr_t ad_low,
  input  thr_t ad_high,
  input  logic in_valid,
  input  logic in_last,
  input  mag_t in_mag,
  output logic out_valid,
  output logic out_last,
  output cls_t out_cls,
  output thr_t cur_low,
  output thr_t cur_high,
  output logic cur_improved
);

  thr_t m8;
  assign m8 = mag_to_thr(in_mag);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      out_last     <= 1'b0;
      out_cls      <= CLS_NONE;
      cur_improved <= mode_improved;
      cur_low      <= mode_improved ? ad_low  : T_LOW_FIX;
      cur_high     <= mode_improved ? ad_high : T_HIGH_FIX;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        if (m8 >= cur_high)     out_cls <= CLS_STRONG;
        else if (m8 >= cur_low) out_cls <= CLS_WEAK;
        else                    out_cls <= CLS_NONE;
        if (in_last) begin
          cur_improved <= mode_improved;
          cur_low      <= mode_improved ? ad_low  : T_LOW_FIX;
          cur_high     <= mode_improved ? ad_high : T_HIGH_FIX;
        end
      end
    end
  end

endmodule
