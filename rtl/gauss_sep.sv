// gauss_sep: separable Gaussian smoothing of the gradient magnitude.
//
// As the document proposes, the smoothing is applied to the gradient
// magnitude image and done as two 1-D passes instead of one 2-D convolution.
// The 1-D kernel is the binomial [1 4 6 4 1]/16, whose variance is exactly 1,
// matching the sigma = 1 the document evaluates with (the tap values are this
// design's choice). Four line buffers give a 5-tall column per pixel; the
// vertical pass sums it into a 15-bit value, which is shifted into a 5-long
// horizontal register; the horizontal pass sums that and divides by 256. The
// orientation of the centre pixel travels along (it is read from the centre
// row of the column and the centre of the horizontal register) so that the
// suppression stage sees the orientation belonging to each magnitude.
//
// A W x H input gives (W-4) x (H-4) outputs; latency two clocks after the
// pixel completing the 5x5 neighbourhood; one pixel per clock.
module gauss_sep
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 798,
  parameter int unsigned IMG_H = 530
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_last,
  input  grad_t in_grad,
  output logic  out_valid,
  output logic  out_last,
  output grad_t out_grad
);

  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);
  localparam int unsigned VW = MAG_W + 4;   // vertical sum, weights total 16
  localparam int unsigned HW = VW + 4;      // horizontal sum, weights total 16

  typedef struct packed {
    dir_t          dir;
    logic [VW-1:0] v;
  } vsum_t;

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  grad_t         lb [4][IMG_W];
  grad_t         col [5];
  vsum_t         hs [5];
  logic [VW-1:0] vsum;
  logic [HW-1:0] hsum;
  logic          s_valid, s_last;

  always_comb begin
    for (int r = 0; r < 4; r++) col[r] = lb[r][x];
    col[4] = in_grad;
    vsum = VW'(col[0].mag) + VW'({col[1].mag, 2'b00}) + VW'(col[2].mag) * VW'(6)
         + VW'({col[3].mag, 2'b00}) + VW'(col[4].mag);
    hsum = HW'(hs[0].v) + HW'({hs[1].v, 2'b00}) + HW'(hs[2].v) * HW'(6)
         + HW'({hs[3].v, 2'b00}) + HW'(hs[4].v);
  end

  wire win_ok   = (x >= XW'(4)) && (y >= YW'(4));
  wire last_pix = in_last || ((x == XW'(IMG_W - 1)) && (y == YW'(IMG_H - 1)));

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int r = 0; r < 4; r++) lb[r][x] <= col[r+1];
      for (int c = 0; c < 4; c++) hs[c] <= hs[c+1];
      hs[4] <= '{dir: col[2].dir, v: vsum};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      s_valid   <= 1'b0;
      s_last    <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_grad  <= '0;
    end else begin
      s_valid   <= in_valid && win_ok;
      s_last    <= in_valid && win_ok && last_pix;
      out_valid <= s_valid;
      out_last  <= s_last;
      if (s_valid) out_grad <= '{dir: hs[2].dir, mag: mag_t'(hsum >> 8)};
      if (in_valid) begin
        if (last_pix) begin
          x <= '0;
          y <= '0;
        end else if (x == XW'(IMG_W - 1)) begin
          x <= '0;
          y <= y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

endmodule
