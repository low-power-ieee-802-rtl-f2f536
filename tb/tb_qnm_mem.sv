// tb_qnm_mem: random writes to the 24x6 Qnm memory and asynchronous reads,
// which must show a write from the cycle before.
module tb_qnm_mem;
  logic       clk = 0;
  logic       wr_en = 0;
  logic [4:0] wr_addr = '0, rd_addr = '0;
  logic [5:0] wr_data = '0, rd_data;
  logic [5:0] ref_mem [24];
  int checks = 0, failures = 0;

  qnm_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 24; a++) begin
      ref_mem[a] = 6'($urandom);
      @(negedge clk); wr_en = 1; wr_addr = 5'(a); wr_data = ref_mem[a];
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 300; t++) begin
      int a, b;
      a = $urandom_range(23);
      b = $urandom_range(23);
      @(negedge clk);
      rd_addr = 5'(a);
      #1;
      checks++;
      if (rd_data != ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d", a);
      end
      wr_en = $urandom_range(1); wr_addr = 5'(b); wr_data = 6'($urandom);
      @(posedge clk); #1;
      if (wr_en) ref_mem[b] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
