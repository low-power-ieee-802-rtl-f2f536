// tb_vn_mem: fills the 24x162 memory with random words, reads them back
// (data one cycle after the address), and checks that a read and a write
// of the same word in one cycle return the old word.
module tb_vn_mem;
  logic         clk = 0;
  logic         rd_en = 0, wr_en = 0;
  logic [4:0]   rd_addr = '0, wr_addr = '0;
  logic [161:0] rd_data, wr_data = '0;
  logic [161:0] ref_mem [24];
  int checks = 0, failures = 0;

  vn_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [161:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int a = 0; a < 24; a++) begin
      ref_mem[a] = rnd();
      @(negedge clk); wr_en = 1; wr_addr = 5'(a); wr_data = ref_mem[a];
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 200; t++) begin
      int a, b;
      a = $urandom_range(23);
      b = $urandom_range(23);
      @(negedge clk);
      rd_en = 1; rd_addr = 5'(a);
      wr_en = $urandom_range(1); wr_addr = 5'(b); wr_data = rnd();
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
