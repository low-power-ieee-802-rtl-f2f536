// cn_r_select: the "Rmn finder" of a check node datapath. It expands the
// compressed check node message into the check-to-variable value Rmn for
// one block column: magnitude is the one-but-min if the column is the one
// that holds the minimum, the min otherwise; sign is the xor of all signs
// of the row with the column's own sign (that is, the xor of the others).
// zero forces Rmn = 0 (no message yet, first iteration). Combinational.
module cn_r_select
  import ldpc_pkg::*;
(
  input  cn_msg_t         msg,
  input  logic [COLW-1:0] col,
  input  logic            zero,
  output r_t              r
);

  logic [MAGW-1:0] mag;
  logic            neg;

  always_comb begin
    mag = (col == msg.idx) ? msg.min2 : msg.min1;
    neg = msg.xsign ^ msg.signs[col];
    if (zero)     r = '0;
    else if (neg) r = -r_t'({1'b0, mag});
    else          r =  r_t'({1'b0, mag});
  end

endmodule
