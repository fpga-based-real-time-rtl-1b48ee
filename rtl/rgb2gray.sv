// rgb2gray: converts an RGB888 pixel stream to 8-bit grey.
//
// The document's pipeline starts by turning the input image into a grey image
// I(x,y) but gives no weights; this design uses the ITU-R BT.601 luma weights
// in 8-bit fixed point, Y = (77 R + 150 G + 29 B) >> 8 (the weights sum to
// 256, so white stays 255). One pixel per clock, one clock of latency; valid
// and last are delayed with the data. Input word: {R, G, B}, R in [23:16].
module rgb2gray
  import edge_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_last,
  input  logic [23:0] in_rgb,
  output logic        out_valid,
  output logic        out_last,
  output pix_t        out_gray
);

  logic [15:0] y_sum;

  always_comb begin
    y_sum = 16'd77 * 16'(in_rgb[23:16]) + 16'd150 * 16'(in_rgb[15:8]) + 16'd29 * 16'(in_rgb[7:0]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_gray  <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) out_gray <= y_sum[15:8];
    end
  end

endmodule
