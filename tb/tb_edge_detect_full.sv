// tb_edge_detect_full: the edge detector at its default size, 800 x 532.
//
// Same checks as tb_edge_detect_top, on three full frames through
// edge_detect_top with its default parameters: frame 0 in the basic mode and
// frame 1 in the improved mode (thresholds adapted from frame 0), both without
// gaps (their latency of 14 clocks is checked), frame 2 in the basic mode with
// random gaps in s_tvalid. Each frame yields 786 x 518 = 407148 edge pixels,
// all compared with the model of edge_ref_pkg, together with m_tlast, the
// per-frame counts, the threshold pair and the mechanism counters.
`timescale 1ns/1ps
module tb_edge_detect_full;
  import edge_ref_pkg::*;

  localparam int W = 800, H = 532, NF = 3;
  localparam int WO = W - 14, HO = H - 14, NOUT = WO * HO;
  localparam int LAT = 14;
  localparam int NOISE = 60;
  localparam int MAX_TRIES = 3;
  localparam bit MODES [NF] = '{1'b0, 1'b1, 1'b0};
  localparam bit GAPS  [NF] = '{1'b0, 1'b0, 1'b1};

  logic clk = 1'b0, rst_n = 1'b0;
  logic s_tvalid = 1'b0, s_tlast = 1'b0, mode_improved;
  logic [23:0] s_tdata = '0;
  logic m_tvalid, m_tlast;
  logic [7:0] m_tdata;
  logic [31:0] in_count, out_count, n_sobel, n_canny, n_final;
  logic [7:0] t_low, t_high, mean_mag;

  always #5 clk = ~clk;

  edge_detect_top dut (.*);

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

  // Watchdog.
  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Test image: ramp + rectangles + discs + texture + salt noise.
  function automatic void make_frame(input int f, ref img_t r, ref img_t g, ref img_t b);
    int base [];
    base = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) base[y*W+x] = 20 + 3 * x + ($urandom % NOISE);
    for (int k = 0; k < 3 + W * H / 2000; k++) begin
      int x0 = $urandom % (W - 8), y0 = $urandom % (H - 8);
      int ww = 4 + $urandom % 12, hh = 4 + $urandom % 10, v = 30 + $urandom % 220;
      for (int y = y0; y < y0 + hh && y < H; y++)
        for (int x = x0; x < x0 + ww && x < W; x++) base[y*W+x] = v;
    end
    begin
      int cx = 8 + $urandom % (W - 16), cy = 8 + $urandom % (H - 16), rad = 3 + $urandom % 5;
      int v = ($urandom % 2) ? 240 : 10;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          if ((x-cx)*(x-cx) + (y-cy)*(y-cy) <= rad*rad) base[y*W+x] = v;
    end
    // a patch of strong random texture: scattered maxima, isolated edge pixels
    for (int y = H / 2; y < H / 2 + 10 && y < H; y++)
      for (int x = 2; x < 14; x++) base[y*W+x] = 60 + ($urandom % 120);
    // small bright spots: short, often isolated, edge responses
    for (int k = 0; k < W * H / 120; k++) begin
      int sx = 1 + $urandom % (W - 4), sy = 1 + $urandom % (H - 4);
      for (int y = sy; y < sy + 3; y++)
        for (int x = sx; x < sx + 3; x++) base[y*W+x] = 90 + $urandom % 60;
    end
    for (int k = 0; k < 6 + W * H / 200; k++) base[($urandom % H) * W + ($urandom % W)] = 255;
    r = {}; g = {}; b = {};
    for (int i = 0; i < W * H; i++) begin
      int v = base[i] > 255 ? 255 : base[i];
      r.push_back(v);
      g.push_back(v > 20 ? v - 20 + ($urandom % 21) : v);
      b.push_back(255 - v);
    end
  endfunction

  img_t exp_out;
  int   exp_ns[NF], exp_nc[NF], exp_nf[NF], exp_tl[NF], exp_th[NF];
  int   n_med = 0, n_supp = 0, n_prom = 0, n_drop = 0, n_rem = 0, n_adapt = 0, n_gap = 0, n_switch = 0;
  int   last_in_cyc[NF];

  // Reference model of the whole chain for frame f; results are committed to
  // the expected stream and the mechanism counters only when commit is set.
  task automatic model(input int f, input img_t r, input img_t g, input img_t b,
                       inout int atl, inout int ath, input bit commit, output int removed);
    img_t gr, md, mg, dr, se, gm, gd, nm, cl, hy, mo;
    int tl, th, ntl, nth, mean8, s, prom, drop, med, supp;
    prom = 0; drop = 0; removed = 0; med = 0; supp = 0;
    for (int i = 0; i < W * H; i++) gr.push_back(gray(r[i], g[i], b[i]));
    median(gr, W, H, md);
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) if (md[(y-1)*(W-2)+x-1] != gr[y*W+x]) med++;
    sobel(md, W - 2, H - 2, 40, mg, dr, se);
    gauss(mg, dr, W - 4, H - 4, gm, gd);
    nms(gm, gd, W - 8, H - 8, nm);
    for (int y = 1; y < H - 9; y++)
      for (int x = 1; x < W - 9; x++)
        if (nm[(y-1)*(W-10)+x-1] == 0 && gm[y*(W-8)+x] != 0) supp++;
    tl = MODES[f] ? atl : 21;
    th = MODES[f] ? ath : 52;
    foreach (nm[i]) cl.push_back(classify(nm[i], tl, th));
    hyst(cl, W - 10, H - 10, hy, prom, drop);
    morph(hy, W - 12, H - 12, MODES[f], mo, removed);
    if (commit) begin
      n_med += med; n_supp += supp; n_prom += prom; n_drop += drop; n_rem += removed;
      foreach (mo[i]) exp_out.push_back(mo[i]);
      s = 0; foreach (se[i]) s += se[i]; exp_ns[f] = s;
      s = 0; foreach (hy[i]) s += hy[i]; exp_nc[f] = s;
      s = 0; foreach (mo[i]) s += mo[i]; exp_nf[f] = s;
      exp_tl[f] = tl; exp_th[f] = th;
      adapt(gm, ntl, nth, mean8);
      if (ntl != atl || nth != ath) n_adapt++;
      atl = ntl; ath = nth;
    end
  endtask

  // Output capture.
  int got[$];
  int last_idx[$];
  int last_out_cyc[$];
  int ns_seen[$], nc_seen[$], nf_seen[$], tl_seen[$], th_seen[$];
  bit first_of_frame = 1'b1;
  logic last_d = 1'b0;
  always @(posedge clk) if (rst_n) begin
    last_d <= m_tvalid && m_tlast;
    if (last_d) begin
      ns_seen.push_back(n_sobel); nc_seen.push_back(n_canny); nf_seen.push_back(n_final);
    end
    if (m_tvalid) begin
      check(m_tdata == 8'h00 || m_tdata == 8'hff, "m_tdata not 0/255");
      if (first_of_frame) begin
        tl_seen.push_back(t_low); th_seen.push_back(t_high);
      end
      first_of_frame = m_tlast;
      got.push_back(m_tdata == 8'hff ? 1 : 0);
      if (m_tlast) begin
        last_idx.push_back(got.size() - 1);
        last_out_cyc.push_back(cyc);
      end
    end
  end

  initial begin
    img_t r[NF], g[NF], b[NF];
    int atl = 56, ath = 119;
    for (int f = 0; f < NF; f++) begin
      int removed, tries;
      tries = 0;
      // For an improved-mode frame, draw images until one has an isolated
      // edge pixel for the clean-up to remove (bounded number of draws).
      do begin
        make_frame(f, r[f], g[f], b[f]);
        model(f, r[f], g[f], b[f], atl, ath, 1'b0, removed);
        tries++;
      end while (MODES[f] && removed == 0 && tries < MAX_TRIES);
      model(f, r[f], g[f], b[f], atl, ath, 1'b1, removed);
    end
    mode_improved = MODES[0];
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      if (f > 0 && MODES[f] != MODES[f-1]) n_switch++;
      for (int i = 0; i < W * H; i++) begin
        if (GAPS[f]) while ($urandom % 4 == 0) begin
          s_tvalid <= 1'b0; n_gap++;
          @(posedge clk);
        end
        s_tvalid <= 1'b1;
        s_tlast  <= (i == W * H - 1);
        s_tdata  <= {r[f][i][7:0], g[f][i][7:0], b[f][i][7:0]};
        @(posedge clk);
        if (i == W * H - 1) begin
          last_in_cyc[f] = cyc;
          if (f + 1 < NF) mode_improved <= MODES[f+1];
        end
      end
    end
    s_tvalid <= 1'b0;
    s_tlast  <= 1'b0;
    repeat (200) @(posedge clk);

    check(got.size() == NF * NOUT, $sformatf("output count %0d, expected %0d", got.size(), NF * NOUT));
    for (int i = 0; i < got.size() && i < exp_out.size(); i++)
      check(got[i] == exp_out[i], $sformatf("pixel %0d (frame %0d, x %0d, y %0d): got %0d expected %0d",
            i, i / NOUT, (i % NOUT) % WO, (i % NOUT) / WO, got[i], exp_out[i]));
    check(last_idx.size() == NF, $sformatf("%0d m_tlast pulses", last_idx.size()));
    for (int f = 0; f < NF && f < last_idx.size(); f++) begin
      check(last_idx[f] == (f + 1) * NOUT - 1, $sformatf("m_tlast at %0d", last_idx[f]));
      check(ns_seen[f] == exp_ns[f], $sformatf("frame %0d n_sobel %0d exp %0d", f, ns_seen[f], exp_ns[f]));
      check(nc_seen[f] == exp_nc[f], $sformatf("frame %0d n_canny %0d exp %0d", f, nc_seen[f], exp_nc[f]));
      check(nf_seen[f] == exp_nf[f], $sformatf("frame %0d n_final %0d exp %0d", f, nf_seen[f], exp_nf[f]));
      check(tl_seen[f] == exp_tl[f] && th_seen[f] == exp_th[f],
            $sformatf("frame %0d thresholds [%0d %0d] exp [%0d %0d]", f, tl_seen[f], th_seen[f], exp_tl[f], exp_th[f]));
    end
    // Latency of the gap-free frames 0 and 1.
    for (int f = 0; f < 2 && f < last_out_cyc.size(); f++)
      check(last_out_cyc[f] - last_in_cyc[f] == LAT,
            $sformatf("frame %0d latency %0d, expected %0d", f, last_out_cyc[f] - last_in_cyc[f], LAT));

    for (int f = 0; f < NF; f++) $display("frame %0d mode %0d thr [%0d %0d] n_sobel %0d n_canny %0d n_final %0d", f, MODES[f], exp_tl[f], exp_th[f], exp_ns[f], exp_nc[f], exp_nf[f]);
    $display("mechanisms: median_changes=%0d suppressed=%0d weak_kept=%0d weak_dropped=%0d isolated_removed=%0d adaptive_updates=%0d input_gaps=%0d mode_switches=%0d",
             n_med, n_supp, n_prom, n_drop, n_rem, n_adapt, n_gap, n_switch);
    check(n_med > 0, "median never changed a pixel");
    check(n_supp > 0, "no maximum suppressed");
    check(n_prom > 0, "no weak pixel kept by hysteresis");
    check(n_drop > 0, "no weak pixel dropped by hysteresis");
    check(n_rem > 0, "no isolated pixel removed");
    check(n_adapt > 0, "adaptive thresholds never changed");
    check(n_gap > 0, "no input gap");
    check(n_switch >= 2, "mode did not switch both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
