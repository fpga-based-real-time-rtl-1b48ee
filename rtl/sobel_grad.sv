// sobel_grad: Sobel gradient, magnitude and orientation of a grey stream.
//
// Each 3x3 neighbourhood z[r][c] from a line_window is convolved with the two
// Sobel masks of the document, Gx = [-1 0 1; -2 0 2; -1 0 1] (right minus
// left) and Gy = [-1 -2 -1; 0 0 0; 1 2 1] (bottom minus top). The magnitude is
// the document's hardware form |Gx| + |Gy| (11 bits). The orientation is taken
// from the ratio |Gy|/|Gx| and reduced to the four principal orientations,
// the boundaries tan(22.5 deg) ~ 53/128 and tan(67.5 deg) ~ 309/128 being this
// design's fixed-point choice: 128|Gy| < 53|Gx| gives DIR_0,
// 128|Gy| > 309|Gx| gives DIR_90, otherwise the signs of Gx and Gy pick
// DIR_45 (same sign) or DIR_135. The plain Sobel edge decision of the document,
// magnitude >= T, is produced as out_sobel_edge, on the 8-bit threshold scale
// (T_SOBEL = 40 = 0.1569 x 255, the normalised Sobel threshold of the basic
// pipeline).
//
// A W x H input gives (W-2) x (H-2) outputs; latency two clocks after the
// pixel completing the window; one pixel per clock.
module sobel_grad
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W   = 800,
  parameter int unsigned IMG_H   = 532,
  parameter thr_t        T_SOBEL = 8'd40
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_last,
  input  pix_t  in_pix,
  output logic  out_valid,
  output logic  out_last,
  output grad_t out_grad,
  output logic  out_sobel_edge
);

  logic w_valid, w_last;
  logic [2:0][2:0][PIX_W-1:0] z;

  line_window #(.DW(PIX_W), .K(3), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n, .in_valid, .in_last, .in_data(in_pix),
    .out_valid(w_valid), .out_last(w_last), .win(z)
  );

  logic signed [11:0] gx, gy;
  logic [10:0]        ax, ay;
  mag_t               mag;
  dir_t               dir;
  logic [19:0]        ay128, ax53, ax309;

  always_comb begin
    gx = (12'(z[0][2]) + 12'({z[1][2], 1'b0}) + 12'(z[2][2]))
       - (12'(z[0][0]) + 12'({z[1][0], 1'b0}) + 12'(z[2][0]));
    gy = (12'(z[2][0]) + 12'({z[2][1], 1'b0}) + 12'(z[2][2]))
       - (12'(z[0][0]) + 12'({z[0][1], 1'b0}) + 12'(z[0][2]));
    ax = gx[11] ? 11'(-gx) : 11'(gx);
    ay = gy[11] ? 11'(-gy) : 11'(gy);
    mag = ax + ay;
    ay128 = {2'b00, ay, 7'd0};
    ax53  = 20'(ax) * 20'd53;
    ax309 = 20'(ax) * 20'd309;
    if (ay128 < ax53)       dir = DIR_0;
    else if (ay128 > ax309) dir = DIR_90;
    else if (gx[11] == gy[11]) dir = DIR_45;
    else                    dir = DIR_135;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid      <= 1'b0;
      out_last       <= 1'b0;
      out_grad       <= '0;
      out_sobel_edge <= 1'b0;
    end else begin
      out_valid <= w_valid;
      out_last  <= w_last;
      if (w_valid) begin
        out_grad       <= '{dir: dir, mag: mag};
        out_sobel_edge <= mag_to_thr(mag) >= T_SOBEL;
      end
    end
  end

endmodule
