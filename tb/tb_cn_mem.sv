// tb_cn_mem: random writes and reads of the 12x38 check node memory,
// read data one cycle after the address, old word on a same-cycle write.
module tb_cn_mem;
  logic        clk = 0;
  logic        wr_en = 0;
  logic [3:0]  rd_addr = '0, wr_addr = '0;
  logic [37:0] rd_data, wr_data = '0;
  logic [37:0] ref_mem [12];
  int checks = 0, failures = 0;

  cn_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 12; a++) begin
      ref_mem[a] = {$urandom, $urandom};
      @(negedge clk); wr_en = 1; wr_addr = 4'(a); wr_data = ref_mem[a];
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 200; t++) begin
      int a, b;
      a = $urandom_range(11);
      b = $urandom_range(11);
      @(negedge clk);
      rd_addr = 4'(a);
      wr_en = $urandom_range(1); wr_addr = 4'(b); wr_data = {$urandom, $urandom};
      @(posedge clk); #1;
      checks++;
      if (rd_data != ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d", a);
      end
      if (wr_en) ref_mem[b] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
