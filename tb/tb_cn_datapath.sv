// tb_cn_datapath: runs one check row through many layers of random weight.
// For each layer it drives the read pass (random Qn values, random distinct
// block columns, a random stored message or the first-iteration flag), the
// fin cycle and the write pass, and checks the stored message and every
// returned Qn against min-sum worked out edge by edge: Qnm = sat31(Qn - Rold),
// Rnew = (product of the other signs) * min(other |Qnm| clipped to 15),
// Qn' = sat31(Qnm + Rnew).
module tb_cn_datapath;
  import ldpc_pkg::*;

  logic            clk = 0, rst_n = 0, first_iter = 0, layer_start = 0;
  logic            rd_valid = 0, fin = 0;
  logic [KW-1:0]   rd_k = '0, wr_k = '0;
  logic [COLW-1:0] rd_col = '0, wr_col = '0;
  qn_t             qn_in = '0, qn_out;
  cn_msg_t         cn_rd_msg = '0, cn_wr_msg;
  logic            cn_wr_en;
  int checks = 0, failures = 0;

  cn_datapath dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rold_of(cn_msg_t m, int c);
    int mag;
    mag = (c == int'(m.idx)) ? int'(m.min2) : int'(m.min1);
    return (m.xsign ^ m.signs[c]) ? -mag : mag;
  endfunction

  initial begin
    int w, cols [24], qn [24], qnm [24], perm [24], t, j, mag, a, rn, expq, m1;
    bit neg, fi;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 400; trial++) begin
      w = $urandom_range(2, 24);
      for (int i = 0; i < 24; i++) perm[i] = i;
      for (int i = 23; i > 0; i--) begin
        j = $urandom_range(i); t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      fi = (trial % 5 == 0);
      cn_rd_msg = {$urandom, $urandom};
      cn_rd_msg.idx = COLW'($urandom_range(23));
      for (int i = 0; i < w; i++) begin
        cols[i] = perm[i];
        qn[i]   = int'($urandom_range(62)) - 31;
        qnm[i]  = sat(qn[i] - (fi ? 0 : rold_of(cn_rd_msg, cols[i])), 31);
      end
      // read pass
      @(negedge clk);
      first_iter = fi; layer_start = 1;
      for (int i = 0; i < w; i++) begin
        @(negedge clk);
        layer_start = 0;
        rd_valid = 1; rd_k = KW'(i); rd_col = COLW'(cols[i]); qn_in = qn_t'(qn[i]);
      end
      @(negedge clk);
      rd_valid = 0; fin = 1;
      #1;
      m1 = 15;
      for (int i = 0; i < w; i++) begin
        a = (qnm[i] < 0) ? -qnm[i] : qnm[i];
        if (a > 15) a = 15;
        if (a < m1) m1 = a;
      end
      checks++;
      if (!cn_wr_en || int'(cn_wr_msg.min1) != m1) begin
        failures++;
        if (failures < 10) $display("FAIL message min %0d exp %0d", cn_wr_msg.min1, m1);
      end
      @(negedge clk);
      fin = 0;
      // write pass, in a shuffled order
      for (int i = 0; i < w; i++) begin
        j = (i * 5 + 3) % w;
        wr_k = KW'(j); wr_col = COLW'(cols[j]);
        #1;
        mag = 15; neg = 0;
        for (int o = 0; o < w; o++) if (o != j) begin
          a = (qnm[o] < 0) ? -qnm[o] : qnm[o];
          if (a > 15) a = 15;
          if (a < mag) mag = a;
          neg ^= (qnm[o] < 0);
        end
        rn   = neg ? -mag : mag;
        expq = sat(qnm[j] + rn, 31);
        checks++;
        if (int'(qn_out) != expq) begin
          failures++;
          if (failures < 10) $display("FAIL trial %0d k %0d: qn %0d exp %0d", trial, j, qn_out, expq);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
