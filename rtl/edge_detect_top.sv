// edge_detect_top: streaming hybrid Sobel-Canny edge detector.
//
// An RGB888 raster stream enters at one pixel per clock and a binary edge map
// (0 or 255 per pixel) leaves at one pixel per clock, with no frame buffer:
// every neighbourhood operation is built from line buffers. The chain is
//
//   rgb2gray -> median3x3 -> sobel_grad -> gauss_sep -> nms3x3
//            -> double_thresh -> hysteresis3x3 -> morph_clean
//
// with adaptive_thresh measuring the smoothed magnitude of each frame to set
// the Canny thresholds of the next one. The grey conversion, median filter and
// Sobel stage follow the document's camera system diagram; Sobel gradient
// extraction followed by Gaussian smoothing of the magnitude, suppression,
// double thresholding and hysteresis follow its description of the Canny
// refinement. mode_improved selects the document's improved pipeline
// (adaptive thresholds and morphological clean-up) or its basic one (fixed
// thresholds, no clean-up); the mode takes effect at a frame boundary.
//
// Frame size: every window stage outputs only the pixels whose neighbourhood
// lies inside the image, so a W x H frame yields (W-14) x (H-14) edge pixels
// (3x3 median, 3x3 Sobel, 5x5 Gaussian, 3x3 suppression, 3x3 hysteresis,
// 3x3 clean-up: 1+1+2+1+1+1 pixels trimmed per side). s_tlast marks the last
// pixel of a frame and m_tlast the last edge pixel. The stream has no ready
// signal: the design accepts a pixel on every clock that s_tvalid is high, and
// gaps in s_tvalid are carried through as gaps in m_tvalid.
//
// Status outputs: in_count/out_count count the pixels of the frame in
// progress at the input and output; n_sobel, n_canny and n_final hold, for the
// last completed frame, the number of fixed-threshold Sobel edge pixels, of
// edge pixels after hysteresis and of edge pixels after clean-up; t_low and
// t_high show the threshold pair in use; mean_mag is the mean smoothed
// gradient magnitude of the last measured frame (8-bit threshold scale).
module edge_detect_top
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W   = 800,
  parameter int unsigned IMG_H   = 532,
  parameter thr_t        T_SOBEL = 8'd40
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_tvalid,
  input  logic        s_tlast,
  input  logic [23:0] s_tdata,
  input  logic        mode_improved,
  output logic        m_tvalid,
  output logic        m_tlast,
  output logic [7:0]  m_tdata,
  output logic [31:0] in_count,
  output logic [31:0] out_count,
  output logic [31:0] n_sobel,
  output logic [31:0] n_canny,
  output logic [31:0] n_final,
  output thr_t        t_low,
  output thr_t        t_high,
  output thr_t        mean_mag
);

  // Frame size at the input of each window stage.
  localparam int unsigned W_SOB = IMG_W - 2, H_SOB = IMG_H - 2;
  localparam int unsigned W_GAU = IMG_W - 4, H_GAU = IMG_H - 4;
  localparam int unsigned W_NMS = IMG_W - 8, H_NMS = IMG_H - 8;
  localparam int unsigned W_HYS = IMG_W - 10, H_HYS = IMG_H - 10;
  localparam int unsigned W_MOR = IMG_W - 12, H_MOR = IMG_H - 12;

  logic  g_valid, g_last;   pix_t  g_pix;
  logic  md_valid, md_last; pix_t  md_pix;
  logic  sb_valid, sb_last; grad_t sb_grad; logic sb_edge;
  logic  gs_valid, gs_last; grad_t gs_grad;
  logic  nm_valid, nm_last; mag_t  nm_mag;
  logic  dt_valid, dt_last; cls_t  dt_cls;
  logic  hy_valid, hy_last, hy_edge;
  logic  mc_valid, mc_last, mc_edge;
  thr_t  ad_low, ad_high;
  logic  cur_improved;

  rgb2gray u_gray (
    .clk, .rst_n, .in_valid(s_tvalid), .in_last(s_tlast), .in_rgb(s_tdata),
    .out_valid(g_valid), .out_last(g_last), .out_gray(g_pix)
  );

  median3x3 #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_median (
    .clk, .rst_n, .in_valid(g_valid), .in_last(g_last), .in_pix(g_pix),
    .out_valid(md_valid), .out_last(md_last), .out_pix(md_pix)
  );

  sobel_grad #(.IMG_W(W_SOB), .IMG_H(H_SOB), .T_SOBEL(T_SOBEL)) u_sobel (
    .clk, .rst_n, .in_valid(md_valid), .in_last(md_last), .in_pix(md_pix),
    .out_valid(sb_valid), .out_last(sb_last), .out_grad(sb_grad), .out_sobel_edge(sb_edge)
  );

  gauss_sep #(.IMG_W(W_GAU), .IMG_H(H_GAU)) u_gauss (
    .clk, .rst_n, .in_valid(sb_valid), .in_last(sb_last), .in_grad(sb_grad),
    .out_valid(gs_valid), .out_last(gs_last), .out_grad(gs_grad)
  );

  adaptive_thresh #(.N_PIX((IMG_W - 8) * (IMG_H - 8))) u_adapt (
    .clk, .rst_n, .in_valid(gs_valid), .in_last(gs_last), .in_mag(gs_grad.mag),
    .t_low(ad_low), .t_high(ad_high), .mean(mean_mag), .upd()
  );

  nms3x3 #(.IMG_W(W_NMS), .IMG_H(H_NMS)) u_nms (
    .clk, .rst_n, .in_valid(gs_valid), .in_last(gs_last), .in_grad(gs_grad),
    .out_valid(nm_valid), .out_last(nm_last), .out_mag(nm_mag)
  );

  double_thresh u_dthr (
    .clk, .rst_n, .mode_improved, .ad_low, .ad_high,
    .in_valid(nm_valid), .in_last(nm_last), .in_mag(nm_mag),
    .out_valid(dt_valid), .out_last(dt_last), .out_cls(dt_cls),
    .cur_low(t_low), .cur_high(t_high), .cur_improved
  );

  hysteresis3x3 #(.IMG_W(W_HYS), .IMG_H(H_HYS)) u_hyst (
    .clk, .rst_n, .in_valid(dt_valid), .in_last(dt_last), .in_cls(dt_cls),
    .out_valid(hy_valid), .out_last(hy_last), .out_edge(hy_edge)
  );

  morph_clean #(.IMG_W(W_MOR), .IMG_H(H_MOR)) u_morph (
    .clk, .rst_n, .mode_improved(cur_improved),
    .in_valid(hy_valid), .in_last(hy_last), .in_edge(hy_edge),
    .out_valid(mc_valid), .out_last(mc_last), .out_edge(mc_edge)
  );

  assign m_tvalid = mc_valid;
  assign m_tlast  = mc_last;
  assign m_tdata  = {8{mc_edge}};

  // Per-frame counters.
  logic [31:0] cnt_sobel, cnt_canny, cnt_final;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_count  <= '0;
      out_count <= '0;
      cnt_sobel <= '0;
      cnt_canny <= '0;
      cnt_final <= '0;
      n_sobel   <= '0;
      n_canny   <= '0;
      n_final   <= '0;
    end else begin
      if (s_tvalid) in_count <= s_tlast ? '0 : in_count + 1'b1;
      if (mc_valid) out_count <= mc_last ? '0 : out_count + 1'b1;
      if (sb_valid) begin
        cnt_sobel <= sb_last ? '0 : cnt_sobel + 32'(sb_edge);
        if (sb_last) n_sobel <= cnt_sobel + 32'(sb_edge);
      end
      if (hy_valid) begin
        cnt_canny <= hy_last ? '0 : cnt_canny + 32'(hy_edge);
        if (hy_last) n_canny <= cnt_canny + 32'(hy_edge);
      end
      if (mc_valid) begin
        cnt_final <= mc_last ? '0 : cnt_final + 32'(mc_edge);
        if (mc_last) n_final <= cnt_final + 32'(mc_edge);
      end
    end
  end

endmodule
