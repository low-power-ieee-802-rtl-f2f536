// tb_addr_gen: runs the controller alone for both code rates and checks it
// with a scoreboard:
//   - reads come in table order (layer by layer, sub-matrix by sub-matrix)
//     and never target a column whose write-back is outstanding;
//   - each read's shift amount is (s - rotation of the stored word) mod 27,
//     with the rotation tracked here from the observed writes;
//   - writes come in table order, one fin per layer with the right layer;
//   - pipeline tags (k, column, first iteration) follow their reads;
//   - the output pass reads columns 0..23 with shift (0 - rotation) mod 27;
//   - the cycle count lies between the read-only bound and the strict
//     read-then-write bound, and equals 445 / 355 cycles for 3 iterations.
// It also requires that reads stall and that reads and writes overlap.
module tb_addr_gen;
  import ldpc_pkg::*;

  logic            clk = 0, rst_n = 0, start = 0, ld_valid = 0;
  rate_e           rate_in = RATE_1_2;
  logic [3:0]      iters_in = 4'd2;
  logic [COLW-1:0] ld_col = '0;
  logic            busy, done, vn_rd_en, s2_valid, s2_first, s2_out, fin, wr_valid;
  logic [COLW-1:0] vn_rd_addr, s2_col, wr_col;
  logic [SHW-1:0]  s1_shift;
  logic [LAYW-1:0] s1_layer, fin_layer;
  logic [KW-1:0]   s2_k, wr_k;
  rate_e           rate;
  logic [3:0]      iter;
  int checks = 0, failures = 0;
  int n_stall = 0, n_overlap = 0;

  addr_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  typedef struct { int layer; int k; int col; int sh; int first; } ent_t;

  task automatic run(rate_e r, int its);
    ent_t sched [$];
    int rot [24];
    bit pend [24];
    int rd_i, wr_i, out_i, nfin, cyc, lo, hi, w;
    int exp_sh1, exp_k1, exp_col1, exp_first1, exp_out1;
    bit v1, v2, o1, o2;
    int exp_k2, exp_col2, exp_first2;
    ent_t e;
    // schedule from the base matrix
    lo = 27; hi = 27;
    for (int it = 0; it < its; it++)
      for (int l = 0; l < num_layers(r); l++) begin
        w = 0;
        for (int c = 0; c < 24; c++)
          if (bm_entry(r, l, c) >= 0) begin
            e.layer = l; e.k = w; e.col = c; e.sh = bm_entry(r, l, c); e.first = (it == 0);
            sched.push_back(e);
            w++;
          end
        lo += w; hi += 2*w + 3;
      end
    for (int c = 0; c < 24; c++) begin
      @(negedge clk); ld_valid = 1; ld_col = COLW'(c); rot[c] = 0; pend[c] = 0;
    end
    @(negedge clk);
    ld_valid = 0; rate_in = r; iters_in = 4'(its); start = 1;
    @(negedge clk);
    start = 0;
    rd_i = 0; wr_i = 0; out_i = 0; nfin = 0; cyc = 1;
    v1 = 0; v2 = 0; o1 = 0; o2 = 0;
    exp_sh1 = 0; exp_k1 = 0; exp_col1 = 0; exp_first1 = 0; exp_out1 = 0;
    exp_k2 = 0; exp_col2 = 0; exp_first2 = 0;
    while (!done) begin
      // stage 2 tags of the read two cycles ago
      if (v2) check(s2_valid && int'(s2_k) == exp_k2 && int'(s2_col) == exp_col2 &&
                    s2_first == exp_first2[0], "stage 2 tag");
      else    check(!s2_valid, "no stage 2 tag");
      if (o2) check(s2_out, "output tag");
      // stage 1 shift of the read one cycle ago
      if (v1 || o1) check(int'(s1_shift) == exp_sh1, "shift amount");
      v2 = v1; o2 = o1; exp_k2 = exp_k1; exp_col2 = exp_col1; exp_first2 = exp_first1;
      v1 = 0; o1 = 0;
      // reads
      if (vn_rd_en) begin
        if (rd_i < sched.size()) begin
          e = sched[rd_i];
          check(int'(vn_rd_addr) == e.col, "read order");
          check(!pend[e.col], "read of pending column");
          if (wr_valid) n_overlap++;
          exp_sh1 = (e.sh - rot[e.col] + 27) % 27;
          exp_k1 = e.k; exp_col1 = e.col; exp_first1 = e.first;
          v1 = 1;
          pend[e.col] = 1;
          rd_i++;
        end else begin
          check(int'(vn_rd_addr) == out_i, "output read order");
          check(wr_i == sched.size(), "output after last write");
          exp_sh1 = (27 - rot[out_i]) % 27;
          o1 = 1;
          out_i++;
        end
      end else if (rd_i < sched.size() && busy && wr_i > 0) n_stall++;
      // writes
      if (wr_valid) begin
        check(wr_i < sched.size(), "write count");
        if (wr_i < sched.size()) begin
          e = sched[wr_i];
          check(int'(wr_col) == e.col && int'(wr_k) == e.k, "write order");
          if (e.k == 0) begin
            check(fin && int'(fin_layer) == e.layer, "fin with first write");
            nfin++;
          end else check(!fin, "fin only with first write");
          rot[e.col] = e.sh;
          pend[e.col] = 0;
        end
        wr_i++;
      end else check(!fin, "fin without write");
      @(negedge clk); cyc++;
    end
    check(rd_i == sched.size() && wr_i == sched.size() && out_i == 24, "all reads, writes, outputs");
    check(nfin == num_layers(r) * its, "fin count");
    check(cyc > lo && cyc <= hi, "cycle count bounds");
    if (its == 3) check(cyc == ((r == RATE_1_2) ? 445 : 355), "3-iteration cycle count");
    @(negedge clk);
    check(!busy, "idle after done");
    $display("rate %0d, %0d iterations: %0d cycles (bounds %0d..%0d)", r, its, cyc, lo, hi);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(RATE_5_6, 3);
    run(RATE_1_2, 3);
    run(RATE_5_6, 1);
    run(RATE_1_2, 2);
    checks++;
    if (n_stall == 0 || n_overlap == 0) begin
      failures++; $display("stalls %0d overlaps %0d", n_stall, n_overlap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
