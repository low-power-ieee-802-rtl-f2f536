// tb_cn_r_select: random compressed messages and columns; Rmn must be the
// one-but-min at the index column, the min elsewhere, with the sign of the
// xor of the other signs, and zero when zero is set.
module tb_cn_r_select;
  import ldpc_pkg::*;

  cn_msg_t         msg;
  logic [COLW-1:0] col;
  logic            zero;
  r_t              r;
  int checks = 0, failures = 0;

  cn_r_select dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mag, expv;
    bit neg;
    for (int t = 0; t < 3000; t++) begin
      msg.min1  = MAGW'($urandom);
      msg.min2  = MAGW'($urandom);
      msg.idx   = COLW'($urandom_range(23));
      msg.signs = NB'($urandom);
      msg.xsign = 1'($urandom);
      col       = (t % 4 == 0) ? msg.idx : COLW'($urandom_range(23));
      zero      = (t % 10 == 0);
      #1;
      mag = (col == msg.idx) ? int'(msg.min2) : int'(msg.min1);
      neg = msg.xsign ^ msg.signs[col];
      expv = zero ? 0 : (neg ? -mag : mag);
      checks++;
      if (int'(r) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d exp %0d", r, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
