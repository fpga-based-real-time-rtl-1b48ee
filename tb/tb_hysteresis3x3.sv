// tb_hysteresis3x3: three 11x8 frames of random classes (mostly none, some
// weak and strong; the second frame with input gaps) through hysteresis3x3,
// compared with a model in which a strong pixel is an edge and a weak pixel
// is an edge only next to a strong one. Weak pixels kept and dropped must both
// occur. Also output count, out_last and the two-clock latency.
`timescale 1ns/1ps
module tb_hysteresis3x3;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 11, H = 8, NF = 3;
  localparam int NOUT = (W - 2) * (H - 2);
  localparam int LAT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic out_valid, out_last;
  cls_t in_cls = CLS_NONE;
  logic out_edge;

  always #5 clk = ~clk;

  hysteresis3x3 #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .in_valid, .in_last, .in_cls, .out_valid, .out_last, .out_edge);

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
  int n_prom = 0, n_drop = 0;
  int last_idx[$], last_out_cyc[$], last_in_cyc[NF];
  int nout = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      got.push_back(int'(out_edge));
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
      int prom, drop;
      prom = 0;
      drop = 0;
      for (int i = 0; i < W * H; i++) begin
        int r;
        r = int'($urandom % 10);
        inp[f].push_back(r < 6 ? 0 : r < 9 ? 1 : 2);
      end
      hyst(inp[f], W, H, o, prom, drop);
      n_prom += prom;
      n_drop += drop;
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
        in_cls <= cls_t'(inp[f][i][1:0]);
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
    check(n_prom > 0 && n_drop > 0, "weak pixels kept and dropped must both occur");
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
