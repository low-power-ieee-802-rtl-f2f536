// tb_ldpc_decoder: end-to-end test of the decoder at its full size.
//
// Each case encodes a random codeword of the chosen rate, sends it through
// a noisy channel (LLR = +/-A plus an approximately Gaussian noise, clipped
// to [-31, 31]), loads it, decodes it and compares every one of the 648
// output values with the reference model bit for bit. It also checks the
// hard decisions against the sent codeword where the channel was clean
// enough, and that the decoder ignores a load or start while busy. The
// cycle count from start to done must lie above the read-only bound (w
// cycles per layer plus 27 for the output) and at most the strict
// read-then-write bound (2w+3 per layer plus 27), and equal 445 / 355
// cycles for 3 iterations at rate 1/2 / 5/6. Coverage counted and
// required: both code rates, a rate change between codewords, non-zero
// differential shifts, Qnm saturation, channel errors that the decoder
// corrected, ignored commands while busy, read stalls on pending columns,
// reads overlapping a write pass.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_model_pkg::*;

  logic             clk = 0, rst_n = 0;
  logic             ld_valid = 0, start = 0, rate_sel = 0;
  logic [COLW-1:0]  ld_col = '0;
  logic [WORDW-1:0] ld_data = '0;
  logic [3:0]       iters = 4'd3;
  logic             ld_ready, busy, done, out_valid;
  logic [COLW-1:0]  out_col;
  logic [WORDW-1:0] out_qn;
  logic [Z-1:0]     out_bits;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_rate [2] = '{0, 0};
  int n_rate_change = 0, n_diff_shift = 0, n_corrected = 0, n_busy_ignored = 0;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  int n_stall = 0, n_overlap = 0, t12 = 1, t56 = 1;
  always @(posedge clk) begin
    if (dut.u_addr_gen.issue && dut.u_addr_gen.diff != 0) n_diff_shift++;
    if (dut.u_addr_gen.state == 2'd1 && !dut.u_addr_gen.issue) n_stall++;
    if (dut.u_addr_gen.issue && dut.wr_valid) n_overlap++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycles of one iteration: strict read-then-write (upper bound) and
  // reads alone (lower bound).
  function automatic int layer_cycles(rate_e rate, bit strict);
    int t = 0, w;
    for (int l = 0; l < num_layers(rate); l++) begin
      w = 0;
      for (int c = 0; c < int'(NB); c++) if (bm_entry(rate, l, c) >= 0) w++;
      t += strict ? 2*w + 3 : w;
    end
    return t;
  endfunction

  function automatic int gauss(int sigma4);
    // sum of four uniforms in [-sigma4, sigma4] / 2: std about sigma4*0.58
    int s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(2*sigma4)) - sigma4;
    return s / 2;
  endfunction

  task automatic run_case(rate_e rate, int it, int amp, int noise, bit expect_clean);
    row_t x;
    int   q [N];
    int   ch_err = 0, out_err = 0, t0, t1, exp_cyc;
    logic [WORDW-1:0] w;
    int v, c, n, hv;
    x = encode(rate);
    if (!syndrome_ok(rate, x)) begin
      failures++; $display("encoder produced a non-codeword");
    end
    for (int n = 0; n < int'(N); n++) begin
      v = (x[n] ? -amp : amp) + gauss(noise);
      q[n] = sat(v, 31);
      if ((q[n] < 0) != x[n]) ch_err++;
    end
    // load, one word per cycle, in a shuffled column order
    for (int i = 0; i < int'(NB); i++) begin
      c = (i * 7) % int'(NB);
      for (int j = 0; j < int'(Z); j++) w[j*QW +: QW] = QW'(q[c*int'(Z) + j]);
      @(negedge clk);
      ld_valid = 1; ld_col = COLW'(c); ld_data = w;
    end
    @(negedge clk);
    ld_valid = 0;
    checks++;
    if (!ld_ready) begin failures++; $display("not ready while idle"); end
    rate_sel = (rate == RATE_5_6);
    iters    = 4'(it);
    start    = 1;
    @(posedge clk); t0 = cyc;
    @(negedge clk); start = 0;
    // a load and a start while busy must change nothing
    @(negedge clk);
    ld_valid = 1; ld_col = '0; ld_data = '1; start = 1;
    @(negedge clk);
    checks++;
    if (ld_ready || !busy) begin failures++; $display("ready while busy"); end
    else n_busy_ignored++;
    ld_valid = 0; start = 0;
    decode(rate, it, q);
    // collect output
    for (c = 0; c < int'(NB); c++) begin
      do @(posedge clk); while (!out_valid);
      checks++;
      if (out_col != COLW'(c)) begin
        failures++; $display("output column %0d, expected %0d", out_col, c);
      end
      for (int j = 0; j < int'(Z); j++) begin
        n = c*int'(Z) + j;
        hv = int'(qn_t'(out_qn[j*QW +: QW]));
        checks++;
        if (hv != q[n] || out_bits[j] != (q[n] < 0)) begin
          failures++;
          if (failures < 10)
            $display("rate %0d bit %0d: decoder %0d model %0d", rate, n, hv, q[n]);
        end
        if (out_bits[j] != x[n]) out_err++;
      end
    end
    do @(posedge clk); while (!done);
    t1 = cyc;
    // exact value with the table order: 3 iterations take 445 cycles at
    // rate 1/2 and 355 at rate 5/6, output included; the reference
    // throughputs correspond to about 446 and 339 cycles
    exp_cyc = it * layer_cycles(rate, 1) + 27;
    checks++;
    if (t1 - t0 > exp_cyc || t1 - t0 <= it * layer_cycles(rate, 0) + 27) begin
      failures++; $display("cycles %0d, outside (%0d, %0d]", t1 - t0, it * layer_cycles(rate, 0) + 27, exp_cyc);
    end
    if (it == 3) begin
      checks++;
      if (t1 - t0 != ((rate == RATE_1_2) ? 445 : 355)) begin
        failures++; $display("3-iteration cycles %0d", t1 - t0);
      end
    end
    if (expect_clean) begin
      checks++;
      if (out_err != 0) begin failures++; $display("%0d residual errors", out_err); end
    end
    if (ch_err > 0 && out_err == 0) n_corrected++;
    if (it == 3) begin
      if (rate == RATE_1_2) t12 = t1 - t0; else t56 = t1 - t0;
    end
    n_rate[rate]++;
    $display("rate %s iters %0d: channel errors %0d, after decoding %0d, %0d cycles",
             rate == RATE_1_2 ? "1/2" : "5/6", it, ch_err, out_err, t1 - t0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(RATE_1_2, 3, 4, 3, 1);
    run_case(RATE_1_2, 10, 4, 4, 0);
    run_case(RATE_5_6, 3, 5, 3, 1);
    n_rate_change++;
    run_case(RATE_5_6, 10, 12, 8, 0);
    run_case(RATE_1_2, 1, 8, 16, 0);
    n_rate_change++;
    run_case(RATE_1_2, 3, 20, 12, 0);
    n_rate_change++;
    checks += 8;
    if (n_rate[0] == 0)      begin failures++; $display("rate 1/2 never run"); end
    if (n_rate[1] == 0)      begin failures++; $display("rate 5/6 never run"); end
    if (n_rate_change == 0)  begin failures++; $display("no rate change"); end
    if (n_diff_shift == 0)   begin failures++; $display("no differential shift"); end
    if (sat_count == 0)      begin failures++; $display("no Qnm saturation"); end
    if (n_stall == 0)        begin failures++; $display("no read stall"); end
    if (n_overlap == 0)      begin failures++; $display("no overlapped read and write"); end
    if (n_corrected == 0)    begin failures++; $display("no channel error corrected"); end
    $display("coverage: rate1/2 %0d rate5/6 %0d rate changes %0d diff shifts %0d saturations %0d corrected %0d busy-ignored %0d stalls %0d overlaps %0d",
             n_rate[0], n_rate[1], n_rate_change, n_diff_shift, sat_count, n_corrected, n_busy_ignored, n_stall, n_overlap);
    $display("throughput at 3 iterations: rate 1/2 %.2f Mbps at 83.5 MHz, rate 5/6 %.2f Mbps at 71.5 MHz",
             324.0*83.5/t12, 540.0*71.5/t56);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
