// cn_min_finder: the "Rm finder" of a check node datapath. It scans the
// variable-to-check values Qnm of one check row, one per cycle, and builds
// the compressed check node message of the min-sum algorithm: the smallest
// and second smallest magnitude, the block column of the smallest, the sign
// of every value (stored at its block column) and the xor of all signs.
//
// init (first cycle of a layer) restarts the scan; en adds a value. Both may
// be high together, in which case the value is the first of the new scan.
// msg is the running result, valid the cycle after the last en, and is held
// until the next init. Magnitudes are clipped to 15 (4 bits); a new value
// replaces the minimum only if strictly smaller (the earlier one wins ties).
module cn_min_finder
  import ldpc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            en,
  input  qnm_t            qnm,
  input  logic [COLW-1:0] col,
  output cn_msg_t         msg
);

  cn_msg_t base, nxt;
  logic [QNMW-1:0] abs_q;
  logic [MAGW-1:0] mag;
  logic            neg;

  always_comb begin
    neg = qnm[QNMW-1];
    abs_q = neg ? QNMW'(-qnm) : QNMW'(qnm);
    mag   = (abs_q > QNMW'(15)) ? MAGW'(15) : MAGW'(abs_q);
    base = msg;
    if (init) begin
      base       = '0;
      base.min1  = '1;
      base.min2  = '1;
    end
    nxt = base;
    if (en) begin
      if (mag < base.min1) begin
        nxt.min2 = base.min1;
        nxt.min1 = mag;
        nxt.idx  = col;
      end else if (mag < base.min2) begin
        nxt.min2 = mag;
      end
      nxt.signs[col] = neg;
      nxt.xsign      = base.xsign ^ neg;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) msg <= '0;
    else if (init || en) msg <= nxt;
  end

endmodule
