// hysteresis3x3: edge tracking by hysteresis over a 3x3 neighbourhood.
//
// The document keeps a weak pixel only if it is connected to a strong pixel
// within a small neighbourhood. This streaming form makes a single pass: a
// strong pixel is an edge, a weak pixel is an edge if any of its 8 neighbours
// is strong, everything else is not. Chains of weak pixels that reach a strong
// pixel only through other weak pixels are therefore not followed (a full
// connected-component trace would need the whole frame). A line_window
// supplies the neighbourhood of 2-bit classes.
//
// A W x H input gives (W-2) x (H-2) outputs; latency two clocks after the
// pixel completing the window; one pixel per clock.
module hysteresis3x3
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 792,
  parameter int unsigned IMG_H = 524
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_last,
  input  cls_t in_cls,
  output logic out_valid,
  output logic out_last,
  output logic out_edge
);

  logic w_valid, w_last;
  logic [2:0][2:0][1:0] w;
  logic strong_nb, edge_c;

  line_window #(.DW(2), .K(3), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n, .in_valid, .in_last, .in_data(in_cls),
    .out_valid(w_valid), .out_last(w_last), .win(w)
  );

  always_comb begin
    strong_nb = 1'b0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (!(r == 1 && c == 1) && cls_t'(w[r][c]) == CLS_STRONG) strong_nb = 1'b1;
    edge_c = (cls_t'(w[1][1]) == CLS_STRONG) || ((cls_t'(w[1][1]) == CLS_WEAK) && strong_nb);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_edge  <= 1'b0;
    end else begin
      out_valid <= w_valid;
      out_last  <= w_last;
      if (w_valid) out_edge <= edge_c;
    end
  end

endmodule
