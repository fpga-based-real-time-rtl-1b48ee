// adaptive_thresh: derives the Canny threshold pair from frame statistics.
//
// The improved pipeline of the document adjusts its thresholds from image
// statistics to cope with changing illumination; how is not given. This
// design accumulates the smoothed gradient magnitude over one frame, forms the
// mean on the 8-bit threshold scale by multiplying with a reciprocal of the
// (fixed) pixel count computed at elaboration, and sets
//   T_high = min(255, KH_NUM * mean / 2^KH_SHIFT),
//   T_low  = KL_NUM * T_high / 2^KL_SHIFT.
// The default low/high ratio 15/32 ~ 0.47 follows the ratio of the improved
// threshold pair [56 119] the document reports; KH = 3 is this design's
// choice. [56 119] are also the thresholds held from reset until the first
// frame has been measured.
//
// The new pair is presented two clocks after the last pixel of a frame
// (in_valid && in_last), with a one-clock pulse on upd. The consumer applies it
// at its own next frame boundary, so a frame's thresholds come from the frame
// before it.
module adaptive_thresh
  import edge_pkg::*;
#(
  parameter int unsigned N_PIX    = 786 * 524,
  parameter int unsigned KH_NUM   = 3,
  parameter int unsigned KH_SHIFT = 0,
  parameter int unsigned KL_NUM   = 15,
  parameter int unsigned KL_SHIFT = 5,
  parameter thr_t        TL_INIT  = 8'd56,
  parameter thr_t        TH_INIT  = 8'd119
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_last,
  input  mag_t in_mag,
  output thr_t t_low,
  output thr_t t_high,
  output thr_t mean,
  output logic upd
);

  localparam int unsigned SW = MAG_W + $clog2(N_PIX + 1);
  localparam int unsigned RS = 32;                              // reciprocal scale 2^32
  localparam longint unsigned RECIP = ((64'd1 << RS) + 64'(N_PIX) - 1) / 64'(N_PIX);

  logic [SW-1:0] acc, total;
  logic          done;
  logic [63:0]   prod;
  logic [31:0]   mean_full, th_full, tl_full;
  thr_t          mean8, th8, tl8;

  always_comb begin
    prod      = 64'(total) * RECIP;
    mean_full = 32'(prod >> (RS + MAG_SHIFT));
    mean8     = (mean_full > 32'd255) ? 8'd255 : mean_full[7:0];
    th_full   = (32'(mean8) * KH_NUM) >> KH_SHIFT;
    th8       = (th_full > 32'd255) ? 8'd255 : th_full[7:0];
    tl_full   = (32'(th8) * KL_NUM) >> KL_SHIFT;
    tl8       = (tl_full > 32'd255) ? 8'd255 : tl_full[7:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc    <= '0;
      total  <= '0;
      done   <= 1'b0;
      upd    <= 1'b0;
      t_low  <= TL_INIT;
      t_high <= TH_INIT;
      mean   <= '0;
    end else begin
      done <= 1'b0;
      upd  <= done;
      if (in_valid) begin
        if (in_last) begin
          total <= acc + SW'(in_mag);
          acc   <= '0;
          done  <= 1'b1;
        end else begin
          acc <= acc + SW'(in_mag);
        end
      end
      if (done) begin
        mean   <= mean8;
        t_high <= th8;
        t_low  <= tl8;
      end
    end
  end

  // The low threshold never exceeds the high one (KL_NUM <= 2^KL_SHIFT).
  a_order: assert property (@(posedge clk) disable iff (!rst_n) t_low <= t_high);

endmodule
