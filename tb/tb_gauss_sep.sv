// tb_gauss_sep: three 12x9 frames of random {orientation, magnitude} (the
// magnitude up to the largest Sobel value 2040; the second frame with input
// gaps) through gauss_sep, compared with a direct 5x5 convolution by the
// outer product of [1 4 6 4 1] divided by 256, and the orientation of the
// centre pixel. Also output count, out_last and the two-clock latency.
`timescale 1ns/1ps
module tb_gauss_sep;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 12, H = 9, NF = 3;
  localparam int NOUT = (W - 4) * (H - 4);
  localparam int LAT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic out_valid, out_last;
  grad_t in_grad = '0, out_grad;

  always #5 clk = ~clk;

  gauss_sep #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .in_valid, .in_last, .in_grad, .out_valid, .out_last, .out_grad);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  img_t inp [NF];
  img_t ind [NF];
  int gm[$], gd[$], em[$], ed[$];
  int last_idx[$], last_out_cyc[$], last_in_cyc[NF];
  int nout = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      gm.push_back(int'(out_grad.mag)); gd.push_back(int'(out_grad.dir));
      if (out_last) begin
        last_idx.push_back(nout);
        last_out_cyc.push_back(cyc);
      end
      nout++;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      img_t m, d;
      for (int i = 0; i < W * H; i++) begin
        inp[f].push_back(f == 2 ? 2040 - int'($urandom % 3) : int'($urandom % 2041));
        ind[f].push_back(int'($urandom % 4));
      end
      gauss(inp[f], ind[f], W, H, m, d);
      foreach (m[i]) begin em.push_back(m[i]); ed.push_back(d[i]); end
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < inp[f].size(); i++) begin
        if (f % 2 == 1) while ($urandom % 3 == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_last  <= (i == inp[f].size() - 1);
        in_grad <= '{dir: dir_t'(ind[f][i][1:0]), mag: mag_t'(inp[f][i])};
        @(posedge clk);
        if (i == inp[f].size() - 1) last_in_cyc[f] = cyc;
      end
    end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    repeat (20) @(posedge clk);
    check(nout == NF * NOUT, $sformatf("%0d outputs, expected %0d", nout, NF * NOUT));
    for (int i = 0; i < gm.size() && i < em.size(); i++) begin
      check(gm[i] == em[i], $sformatf("pixel %0d: magnitude %0d expected %0d", i, gm[i], em[i]));
      check(gd[i] == ed[i], $sformatf("pixel %0d: direction %0d expected %0d", i, gd[i], ed[i]));
    end
    check(last_idx.size() == NF, $sformatf("%0d out_last pulses, expected %0d", last_idx.size(), NF));
    for (int f = 0; f < NF && f < last_idx.size(); f++)
      check(last_idx[f] == (f + 1) * NOUT - 1, $sformatf("out_last on output %0d", last_idx[f]));
    if (last_out_cyc.size() > 0)
      check(last_out_cyc[0] - last_in_cyc[0] == LAT,
            $sformatf("latency %0d, expected %0d", last_out_cyc[0] - last_in_cyc[0], LAT));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
