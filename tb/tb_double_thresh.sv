// tb_double_thresh: three 9x5 frames of random magnitudes through
// double_thresh in the basic, improved and basic mode, with a different
// adaptive pair presented for each frame. The mode and pair for a frame are
// presented with the last pixel of the frame before (held through reset for
// the first). Every class is compared with the model using [21 52] in the
// basic and the presented pair in the improved mode, and cur_low/cur_high
// are checked on each frame; all three classes must occur, and magnitudes
// on and just below each threshold are included. The second frame
// has input gaps; latency one clock.
`timescale 1ns/1ps
module tb_double_thresh;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 9, H = 5, NF = 3;
  localparam int NOUT = W * H;
  localparam int LAT = 1;
  localparam bit MODES [NF] = '{1'b0, 1'b1, 1'b0};
  localparam int AD_L [NF] = '{30, 10, 40};
  localparam int AD_H [NF] = '{90, 20, 100};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic out_valid, out_last;
  logic mode_improved, cur_improved;
  thr_t ad_low, ad_high, cur_low, cur_high;
  mag_t in_mag = '0;
  cls_t out_cls;

  always #5 clk = ~clk;

  double_thresh dut (.clk, .rst_n, .mode_improved, .ad_low, .ad_high, .in_valid, .in_last, .in_mag,
    .out_valid, .out_last, .out_cls, .cur_low, .cur_high, .cur_improved);

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
  int got[$], expq[$], gtl[$], gth[$];
  int seen[3] = '{0, 0, 0};
  int last_idx[$], last_out_cyc[$], last_in_cyc[NF];
  int nout = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      got.push_back(int'(out_cls)); gtl.push_back(int'(cur_low)); gth.push_back(int'(cur_high));
      if (out_last) begin
        last_idx.push_back(nout);
        last_out_cyc.push_back(cyc);
      end
      nout++;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < W * H; i++) begin
        int m, tl, th;
        tl = MODES[f] ? AD_L[f] : 21;
        th = MODES[f] ? AD_H[f] : 52;
        // random magnitudes, and magnitudes on and just below each threshold
        case (i % 5)
          1: m = tl * 8;
          2: m = th * 8 - 1;
          3: m = (i % 2) ? th * 8 : tl * 8 - 1;
          default: m = int'($urandom % 1000);
        endcase
        inp[f].push_back(m);
        expq.push_back(classify(m, tl, th));
        seen[classify(m, tl, th)]++;
      end
    mode_improved = MODES[0];
    ad_low = thr_t'(AD_L[0]);
    ad_high = thr_t'(AD_H[0]);
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
        in_mag   <= mag_t'(inp[f][i]);
        if (i == inp[f].size() - 1 && f + 1 < NF) begin
          mode_improved <= MODES[f+1];
          ad_low  <= thr_t'(AD_L[f+1]);
          ad_high <= thr_t'(AD_H[f+1]);
        end
        @(posedge clk);
        if (i == inp[f].size() - 1) last_in_cyc[f] = cyc;
      end
    end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    repeat (20) @(posedge clk);
    check(nout == NF * NOUT, $sformatf("%0d outputs, expected %0d", nout, NF * NOUT));
    for (int i = 0; i < got.size() && i < expq.size(); i++) begin
      int f;
      f = i / NOUT;
      check(got[i] == expq[i], $sformatf("pixel %0d (frame %0d): class %0d expected %0d", i, f, got[i], expq[i]));
      // cur_* already show the next frame's pair on a frame's last output.
      if (i % NOUT != NOUT - 1)
        check(gtl[i] == (MODES[f] ? AD_L[f] : 21) && gth[i] == (MODES[f] ? AD_H[f] : 52),
              $sformatf("pixel %0d: thresholds [%0d %0d] mode %0d", i, gtl[i], gth[i], MODES[f]));
    end
    foreach (seen[k]) check(seen[k] > 0, $sformatf("class %0d never occurred", k));
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
