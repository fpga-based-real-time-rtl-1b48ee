// tb_sobel_grad: three 10x7 frames through sobel_grad (random bytes; a frame
// of extreme values 0/255 to reach the largest gradients; the second frame
// with input gaps). Magnitude |Gx|+|Gy|, the quantised orientation and the
// Sobel edge flag (threshold 40) are compared with an integer model of the
// masks; orientations of all four classes are required to occur. Also output
// count, out_last and the two-clock latency.
`timescale 1ns/1ps
module tb_sobel_grad;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 10, H = 7, NF = 3;
  localparam int NOUT = (W - 2) * (H - 2);
  localparam int LAT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic out_valid, out_last;
  pix_t in_pix = '0;
  grad_t out_grad;
  logic out_sobel_edge;

  always #5 clk = ~clk;

  sobel_grad #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .in_valid, .in_last, .in_pix, .out_valid, .out_last,
    .out_grad, .out_sobel_edge);

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
  int gm[$], gd[$], ge[$], em[$], ed[$], ee[$];
  int dir_seen[4] = '{0, 0, 0, 0};
  int last_idx[$], last_out_cyc[$], last_in_cyc[NF];
  int nout = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      gm.push_back(int'(out_grad.mag)); gd.push_back(int'(out_grad.dir)); ge.push_back(int'(out_sobel_edge));
      if (out_last) begin
        last_idx.push_back(nout);
        last_out_cyc.push_back(cyc);
      end
      nout++;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      img_t m, d, e;
      for (int i = 0; i < W * H; i++) inp[f].push_back(f == 2 ? (($urandom % 2) ? 255 : 0) : int'($urandom % 256));
      sobel(inp[f], W, H, 40, m, d, e);
      foreach (m[i]) begin em.push_back(m[i]); ed.push_back(d[i]); ee.push_back(e[i]); dir_seen[d[i]]++; end
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
        in_pix <= inp[f][i][7:0];
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
      check(ge[i] == ee[i], $sformatf("pixel %0d: edge flag %0d expected %0d", i, ge[i], ee[i]));
    end
    foreach (dir_seen[k]) check(dir_seen[k] > 0, $sformatf("orientation %0d never occurred", k));
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
