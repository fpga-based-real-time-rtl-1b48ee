// line_window: KxK sliding window over a raster-scan pixel stream.
//
// K-1 line buffers, each one image row deep, hold the previous K-1 rows. For
// every accepted pixel the buffers are read at the current column, giving a
// K-tall column whose bottom entry is the new pixel; the column is shifted
// into a KxK register window and written back to the buffers moved up by one
// row. The buffers are arrays read asynchronously, which maps to distributed
// (LUT) RAM on an FPGA.
//
// Only windows lying wholly inside the image are presented: out_valid is
// raised for input pixels with row >= K-1 and column >= K-1, so a W x H input
// gives (W-K+1) x (H-K+1) windows, and out_last marks the window of the last
// pixel of the frame (a frame cut short by in_last outside the window area
// resets the counters but raises no out_last). Windows appear one clock after the pixel that completes
// them; one window per clock is sustained, and gaps in in_valid simply pass
// through. win[r][c] is row r (0 = top) and column c (0 = left).
//
// Interface: in_valid/in_last/in_data, valid-only (no backpressure). in_last
// also resynchronises the row and column counters to the start of the next
// frame. Following the document, the windows are built from line buffers
// rather than a frame store; the trimmed border and the counter scheme are
// this design's choices.
module line_window #(
  parameter int unsigned DW    = 8,
  parameter int unsigned K     = 3,
  parameter int unsigned IMG_W = 800,
  parameter int unsigned IMG_H = 532
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_last,
  input  logic [DW-1:0]                 in_data,
  output logic                          out_valid,
  output logic                          out_last,
  output logic [K-1:0][K-1:0][DW-1:0]   win
);

  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [DW-1:0] lb [K-1][IMG_W];
  logic [K-1:0][DW-1:0] col;

  always_comb begin
    for (int r = 0; r < K - 1; r++) col[r] = lb[r][x];
    col[K-1] = in_data;
  end

  wire win_ok   = (x >= XW'(K - 1)) && (y >= YW'(K - 1));
  wire last_pix = in_last || ((x == XW'(IMG_W - 1)) && (y == YW'(IMG_H - 1)));

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int r = 0; r < K - 1; r++) lb[r][x] <= col[r+1];
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) win[r][c] <= win[r][c+1];
        win[r][K-1] <= col[r];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid && win_ok;
      out_last  <= in_valid && win_ok && last_pix;
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

  // A frame-end marker is only ever issued with a window.
  a_last_with_valid: assert property (@(posedge clk) disable iff (!rst_n) out_last |-> out_valid);

endmodule
