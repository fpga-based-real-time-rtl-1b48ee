// tb_adaptive_thresh: checks the adaptive threshold unit over five frames of
// 50 magnitudes each: dark, bright, saturating (mean large enough that
// 3 x mean is clipped to 255) and two random frames, the last with input
// gaps. After reset the pair must be [56 119]; after each frame the pair must
// change only on the upd pulse, two clocks after the frame's last pixel, to
// the model's values (mean on the 8-bit scale, T_high = min(255, 3 mean),
// T_low = 15 T_high / 32), and hold until the next frame ends.
`timescale 1ns/1ps
module tb_adaptive_thresh;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int N = 50, NF = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0, upd;
  mag_t in_mag = '0;
  thr_t t_low, t_high, mean;

  always #5 clk = ~clk;

  adaptive_thresh #(.N_PIX(N)) dut (.clk, .rst_n, .in_valid, .in_last, .in_mag, .t_low, .t_high, .mean, .upd);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_upd = 0;
  always @(posedge clk) if (rst_n && upd) n_upd++;

  initial begin
    int etl, eth, emean, ptl, pth;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(t_low == 8'd56 && t_high == 8'd119, $sformatf("reset pair [%0d %0d]", t_low, t_high));
    ptl = 56; pth = 119;
    for (int f = 0; f < NF; f++) begin
      img_t m;
      m = {};
      for (int i = 0; i < N; i++)
        case (f)
          0: m.push_back(int'($urandom % 40));
          1: m.push_back(500 + int'($urandom % 500));
          2: m.push_back(2040);
          default: m.push_back(int'($urandom % 2041));
        endcase
      adapt(m, etl, eth, emean);
      for (int i = 0; i < N; i++) begin
        if (f == NF - 1) while ($urandom % 3 == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_last  <= (i == N - 1);
        in_mag   <= mag_t'(m[i]);
        @(posedge clk);
        check(t_low == thr_t'(ptl) && t_high == thr_t'(pth), $sformatf("frame %0d pair changed early", f));
      end
      in_valid <= 1'b0;
      in_last  <= 1'b0;
      @(posedge clk);
      check(!upd && t_high == thr_t'(pth), $sformatf("frame %0d: pair changed one clock after the last pixel", f));
      @(posedge clk);
      check(upd, $sformatf("frame %0d: no upd two clocks after the last pixel", f));
      check(t_low == thr_t'(etl) && t_high == thr_t'(eth) && mean == thr_t'(emean),
            $sformatf("frame %0d: pair [%0d %0d] mean %0d, expected [%0d %0d] mean %0d",
                      f, t_low, t_high, mean, etl, eth, emean));
      if (f == 2) check(eth == 255, "saturating frame did not saturate");
      ptl = etl; pth = eth;
      repeat (3) @(posedge clk);
    end
    check(n_upd == NF, $sformatf("%0d upd pulses, expected %0d", n_upd, NF));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
