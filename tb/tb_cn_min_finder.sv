// tb_cn_min_finder: random scans of 1..24 values over distinct block
// columns; the result must hold the smallest and second smallest clipped
// magnitude, the column of the first smallest, every sign at its column and
// the xor of the signs. Values of magnitude above 15 exercise the clipping;
// init together with en checks the restart.
module tb_cn_min_finder;
  import ldpc_pkg::*;

  logic            clk = 0, rst_n = 0, init = 0, en = 0;
  qnm_t            qnm = '0;
  logic [COLW-1:0] col = '0;
  cn_msg_t         msg;
  int checks = 0, failures = 0;

  cn_min_finder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, cols [24], vals [24], mags [24], perm [24];
    int m1, m2, ix, t, j, cnt;
    logic [23:0] sg;
    bit xs;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      w = $urandom_range(1, 24);
      for (int i = 0; i < 24; i++) perm[i] = i;
      for (int i = 23; i > 0; i--) begin
        j = $urandom_range(i); t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      for (int i = 0; i < w; i++) begin
        cols[i] = perm[i];
        vals[i] = (trial % 3 == 0) ? int'($urandom_range(62)) - 31
                                   : int'($urandom_range(20)) - 10;
        mags[i] = (vals[i] < 0) ? -vals[i] : vals[i];
        if (mags[i] > 15) mags[i] = 15;
      end
      // reference
      m1 = 15; m2 = 15; ix = 0; sg = '0; xs = 0;
      for (int i = 0; i < w; i++) if (mags[i] < m1) m1 = mags[i];
      for (int i = 0; i < w; i++) if (mags[i] == m1 && m1 < 15) begin ix = cols[i]; break; end
      cnt = 0;
      for (int i = 0; i < w; i++) if (mags[i] == m1) cnt++;
      if (cnt >= 2) m2 = m1;
      else for (int i = 0; i < w; i++) if (mags[i] != m1 && mags[i] < m2) m2 = mags[i];
      for (int i = 0; i < w; i++) begin
        sg[cols[i]] = (vals[i] < 0);
        xs ^= (vals[i] < 0);
      end
      // drive; first value together with init
      for (int i = 0; i < w; i++) begin
        @(negedge clk);
        init = (i == 0); en = 1; qnm = qnm_t'(vals[i]); col = COLW'(cols[i]);
      end
      @(negedge clk);
      init = 0; en = 0;
      checks++;
      if (msg.min1 != MAGW'(m1) || msg.min2 != MAGW'(m2) || msg.signs != sg ||
          msg.xsign != xs || (m1 < 15 && msg.idx != COLW'(ix))) begin
        failures++;
        if (failures < 10)
          $display("FAIL w=%0d got %0d/%0d/%0d exp %0d/%0d/%0d", w, msg.min1, msg.min2, msg.idx, m1, m2, ix);
      end
      // the result must hold while idle
      repeat (2) @(negedge clk);
      checks++;
      if (msg.min1 != MAGW'(m1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
