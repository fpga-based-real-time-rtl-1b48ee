// nms3x3: non-maximum suppression of the smoothed gradient magnitude.
//
// A line_window supplies the 3x3 neighbourhood of {orientation, magnitude}.
// The centre magnitude is kept only if it is not smaller than both
// neighbours along its gradient orientation (left/right for DIR_0,
// up-left/down-right for DIR_45, up/down for DIR_90, up-right/down-left for
// DIR_135); otherwise it is replaced by 0. Only local comparisons are made, so
// no frame buffer is needed, as the document points out. Keeping equal
// neighbours (>= rather than >) is this design's choice.
//
// A W x H input gives (W-2) x (H-2) outputs; latency two clocks after the
// pixel completing the window; one pixel per clock.
module nms3x3
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 794,
  parameter int unsigned IMG_H = 526
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_last,
  input  grad_t in_grad,
  output logic  out_valid,
  output logic  out_last,
  output mag_t  out_mag
);

  localparam int unsigned GW = $bits(grad_t);

  logic w_valid, w_last;
  logic [2:0][2:0][GW-1:0] w;
  grad_t c;
  mag_t  n1, n2;

  line_window #(.DW(GW), .K(3), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n, .in_valid, .in_last, .in_data(in_grad),
    .out_valid(w_valid), .out_last(w_last), .win(w)
  );

  always_comb begin
    c = grad_t'(w[1][1]);
    unique case (c.dir)
      DIR_0:   begin n1 = w[1][0][MAG_W-1:0]; n2 = w[1][2][MAG_W-1:0]; end
      DIR_45:  begin n1 = w[0][0][MAG_W-1:0]; n2 = w[2][2][MAG_W-1:0]; end
      DIR_90:  begin n1 = w[0][1][MAG_W-1:0]; n2 = w[2][1][MAG_W-1:0]; end
      default: begin n1 = w[0][2][MAG_W-1:0]; n2 = w[2][0][MAG_W-1:0]; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_mag   <= '0;
    end else begin
      out_valid <= w_valid;
      out_last  <= w_last;
      if (w_valid) out_mag <= ((c.mag >= n1) && (c.mag >= n2)) ? c.mag : '0;
    end
  end

endmodule
