// morph_clean: morphological clean-up of the binary edge map.
//
// In the improved mode the document removes isolated noise edges after edge
// tracking. This design removes every edge pixel that has fewer than MIN_NB
// edge pixels among its 8 neighbours (MIN_NB = 1 removes exactly the isolated
// pixels); in the basic mode the centre pixel passes unchanged. The mode is
// sampled at reset and when the last window of a frame is evaluated, so it
// applies to the next frame. A line_window
// supplies the 3x3 neighbourhood, so the stage also trims the frame by one
// pixel on each side in both modes, keeping the output size independent of
// the mode.
//
// A W x H input gives (W-2) x (H-2) outputs; latency two clocks after the
// pixel completing the window; one pixel per clock.
module morph_clean #(
  parameter int unsigned IMG_W  = 790,
  parameter int unsigned IMG_H  = 522,
  parameter int unsigned MIN_NB = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mode_improved,
  input  logic in_valid,
  input  logic in_last,
  input  logic in_edge,
  output logic out_valid,
  output logic out_last,
  output logic out_edge
);

  logic w_valid, w_last, cur_improved;
  logic [2:0][2:0][0:0] w;
  logic [3:0] nb;
  logic keep;

  line_window #(.DW(1), .K(3), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n, .in_valid, .in_last, .in_data(in_edge),
    .out_valid(w_valid), .out_last(w_last), .win(w)
  );

  always_comb begin
    nb = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (!(r == 1 && c == 1)) nb = nb + 4'(w[r][c]);
    keep = w[1][1][0] && (!cur_improved || (nb >= 4'(MIN_NB)));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      out_last     <= 1'b0;
      out_edge     <= 1'b0;
      cur_improved <= mode_improved;
    end else begin
      out_valid <= w_valid;
      out_last  <= w_last;
      if (w_valid) out_edge <= keep;
      if (w_valid && w_last) cur_improved <= mode_improved;
    end
  end

endmodule
