// median3x3: 3x3 median filter on a grey pixel stream.
//
// The camera system of the document places a median filter between the grey
// conversion and the Sobel stage to remove impulse noise; its insides are not
// given. Here a line_window supplies each 3x3 neighbourhood, and the median is
// found by rank: the element that has at most 4 elements strictly before it
// and at most 4 strictly after it in the order (value, position) is the 5th
// of the 9. The result is registered. Only neighbourhoods wholly inside the
// image are produced, so a W x H input gives a (W-2) x (H-2) output. Latency
// is two clocks from the pixel completing a window; one pixel per clock.
module median3x3
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 800,
  parameter int unsigned IMG_H = 532
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_last,
  input  pix_t in_pix,
  output logic out_valid,
  output logic out_last,
  output pix_t out_pix
);

  logic               w_valid, w_last;
  logic [2:0][2:0][PIX_W-1:0] win;
  pix_t               v [9];
  pix_t               med;

  line_window #(.DW(PIX_W), .K(3), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n, .in_valid, .in_last, .in_data(in_pix),
    .out_valid(w_valid), .out_last(w_last), .win
  );

  always_comb begin
    for (int i = 0; i < 9; i++) v[i] = win[i / 3][i % 3];
    med = v[0];
    for (int i = 8; i >= 0; i--) begin
      int unsigned below;
      below = 0;
      for (int j = 0; j < 9; j++) begin
        if ((v[j] < v[i]) || ((v[j] == v[i]) && (j < i))) below++;
      end
      if (below == 4) med = v[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= w_valid;
      out_last  <= w_last;
      if (w_valid) out_pix <= med;
    end
  end

endmodule
