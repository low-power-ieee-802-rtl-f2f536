// tb_hmatrix_rom: checks every entry of the processing-order table against a
// direct scan of the base matrices, the layer weights (22 for every layer
// of rate 5/6, 88 non-zero sub-matrices in all for rate 1/2) and the
// number of layers.
module tb_hmatrix_rom;
  import ldpc_pkg::*;

  rate_e            rate;
  logic [LAYW-1:0]  layer;
  logic [KW-1:0]    k;
  hent_t            ent;
  logic [KW-1:0]    weight;
  logic [LAYW-1:0]  nlayers;
  int checks = 0, failures = 0;

  hmatrix_rom dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (rate %0d layer %0d k %0d)", what, rate, layer, k);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, n;
    for (int ri = 0; ri < 2; ri++) begin
      rate  = rate_e'(ri);
      total = 0;
      for (int l = 0; l < num_layers(rate); l++) begin
        layer = LAYW'(l);
        n = 0;
        for (int c = 0; c < int'(NB); c++) begin
          if (bm_entry(rate, l, c) >= 0) begin
            k = KW'(n);
            #1;
            check(ent.col == COLW'(c), "column");
            check(ent.shift == SHW'(bm_entry(rate, l, c)), "shift");
            n++;
          end
        end
        k = '0;
        #1;
        check(weight == KW'(n), "weight");
        check(nlayers == LAYW'(num_layers(rate)), "layers");
        if (rate == RATE_5_6) check(weight == 5'd22, "rate 5/6 layer weight 22");
        total += n;
      end
      if (rate == RATE_1_2) check(total == 88, "rate 1/2 total");
      else                  check(total == 88, "rate 5/6 total");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
