// tb_barrel_shifter: random 27-lane words, every rotation amount 0..26;
// lane r of the output must be lane (r + amt) mod 27 of the input.
module tb_barrel_shifter;
  localparam int L = 27, W = 6;
  logic [L*W-1:0] din, dout;
  logic [4:0]     amt;
  int checks = 0, failures = 0;

  barrel_shifter #(.LANES(L), .W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < L; i++) din[i*W +: W] = W'($urandom);
      for (int a = 0; a < L; a++) begin
        amt = 5'(a);
        #1;
        for (int r = 0; r < L; r++) begin
          checks++;
          if (dout[r*W +: W] != din[((r + a) % L)*W +: W]) begin
            failures++;
            if (failures < 10) $display("FAIL amt %0d lane %0d", a, r);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
