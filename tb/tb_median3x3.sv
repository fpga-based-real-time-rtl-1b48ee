// tb_median3x3: three 9x6 frames (random bytes, and a narrow value range so
// that ties occur; the second frame with input gaps) through median3x3,
// compared with a sort-based median of every interior 3x3 neighbourhood;
// also output count, out_last and the two-clock latency.
`timescale 1ns/1ps
module tb_median3x3;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 9, H = 6, NF = 3;
  localparam int NOUT = (W - 2) * (H - 2);
  localparam int LAT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic out_valid, out_last;
  pix_t in_pix = '0, out_pix;

  always #5 clk = ~clk;

  median3x3 #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .in_valid, .in_last, .in_pix, .out_valid, .out_last, .out_pix);

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
  int got[$], expq[$];
  int last_idx[$], last_out_cyc[$], last_in_cyc[NF];
  int nout = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      got.push_back(int'(out_pix));
      if (out_last) begin
        last_idx.push_back(nout);
        last_out_cyc.push_back(cyc);
      end
      nout++;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      img_t o;
      for (int i = 0; i < W * H; i++) inp[f].push_back(f == 2 ? int'($urandom % 4) : int'($urandom % 256));
      median(inp[f], W, H, o);
      foreach (o[i]) expq.push_back(o[i]);
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
    for (int i = 0; i < got.size() && i < expq.size(); i++)
      check(got[i] == expq[i], $sformatf("pixel %0d: got %0d expected %0d", i, got[i], expq[i]));
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
