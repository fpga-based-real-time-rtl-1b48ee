// tb_morph_clean: three 11x8 sparse random binary frames through morph_clean,
// in the improved, basic and improved mode (the mode for a frame is presented
// with the last pixel of the frame before, or held through reset for the
// first; the second frame has input gaps). Compared with a model that
// removes edge pixels without edge neighbours in the improved mode and passes
// the centre in the basic mode; removals must occur, and so must isolated
// pixels kept in the basic mode. Also output count, out_last and the two-clock
// latency.
`timescale 1ns/1ps
module tb_morph_clean;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 11, H = 8, NF = 3;
  localparam int NOUT = (W - 2) * (H - 2);
  localparam int LAT = 2;
  localparam bit MODES [NF] = '{1'b1, 1'b0, 1'b1};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic out_valid, out_last;
  logic in_edge = 1'b0, out_edge, mode_improved;

  always #5 clk = ~clk;

  morph_clean #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .mode_improved, .in_valid, .in_last, .in_edge,
    .out_valid, .out_last, .out_edge);

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
  int n_rem = 0, n_basic_iso = 0;
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
      img_t o, o_other;
      int dummy, rem;
      dummy = 0;
      rem = 0;
      for (int i = 0; i < W * H; i++) inp[f].push_back(($urandom % 5 == 0) ? 1 : 0);
      morph(inp[f], W, H, MODES[f], o, rem);
      n_rem += rem;
      morph(inp[f], W, H, !MODES[f], o_other, dummy);
      if (!MODES[f]) n_basic_iso += dummy;
      foreach (o[i]) expq.push_back(o[i]);
    end
    mode_improved = MODES[0];
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
        in_edge  <= inp[f][i][0];
        if (i == inp[f].size() - 1 && f + 1 < NF) mode_improved <= MODES[f+1];
        @(posedge clk);
        if (i == inp[f].size() - 1) last_in_cyc[f] = cyc;
      end
    end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    repeat (20) @(posedge clk);
    check(nout == NF * NOUT, $sformatf("%0d outputs, expected %0d", nout, NF * NOUT));
    for (int i = 0; i < got.size() && i < expq.size(); i++)
      check(got[i] == expq[i], $sformatf("pixel %0d (frame %0d): got %0d expected %0d", i, i / NOUT, got[i], expq[i]));
    check(n_rem > 0, "no isolated pixel removed in the improved mode");
    check(n_basic_iso > 0, "no isolated pixel kept in the basic mode");
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
