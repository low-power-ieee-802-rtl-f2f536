// cn_datapath: one of the 27 check node datapaths. It runs one check row of
// the current layer through the layered min-sum update in two passes.
//
// Read pass (one value per cycle, rd_valid): the total value Qn of a
// connected variable comes in; the check message of the previous iteration,
// Rmn(i-1), is expanded from the row's stored 38-bit message (cn_rd_msg) and
// subtracted, giving Qnm = Qn - Rmn(i-1), saturated to [-31, 31]. Qnm is
// written to the Qnm memory at position rd_k and fed to the min finder.
// In the first iteration (first_iter) Rmn(i-1) is taken as zero.
//
// At fin (at the earliest the cycle after the last read-pass value; the
// controller may delay it until its write port is free) the new compressed
// message Rm(i) is written to the check node memory (cn_wr_en, which is fin
// itself, and cn_wr_msg) and kept in a holding register, because the read
// pass of the next layer may start updating the min finder in that cycle.
//
// Write pass (wr_k, wr_col), starting in the fin cycle: Qnm is read back
// from position wr_k and the new check message Rmn(i), expanded for block
// column wr_col, is added:
// Qn = Qnm + Rmn(i), saturated to [-31, 31]. qn_out is combinational.
// The next layer's read pass may overlap this write pass: its Qnm for
// position k is written no earlier than the cycle in which this layer
// reads position k, and the asynchronous read returns the old entry.
//
// The structure (two Rmn finders, subtractor, Qnm memory, Rm finder, adder)
// follows the datapath of the decoder description; the saturation points,
// the two-pass timing and the 6-bit Qnm memory word are this design's
// choices (a 5-bit Qnm, clipped to the 4-bit message range, made the
// layered update lose the channel value and diverge after two iterations).
module cn_datapath
  import ldpc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            first_iter,
  input  logic            layer_start,
  // read pass
  input  logic            rd_valid,
  input  logic [KW-1:0]   rd_k,
  input  logic [COLW-1:0] rd_col,
  input  qn_t             qn_in,
  input  cn_msg_t         cn_rd_msg,
  // end of read pass
  input  logic            fin,
  output logic            cn_wr_en,
  output cn_msg_t         cn_wr_msg,
  // write pass
  input  logic [KW-1:0]   wr_k,
  input  logic [COLW-1:0] wr_col,
  output qn_t             qn_out
);

  r_t      r_old, r_new;
  qnm_t    qnm, qnm_rd;
  cn_msg_t msg, msg_hold, msg_new;
  logic signed [QW:0] diff, sum;

  cn_r_select u_rold (
    .msg(cn_rd_msg), .col(rd_col), .zero(first_iter), .r(r_old)
  );

  always_comb begin
    diff = (QW+1)'(qn_in) - (QW+1)'(r_old);
    if (diff > 31)       qnm = qnm_t'(31);
    else if (diff < -31) qnm = qnm_t'(-31);
    else                 qnm = qnm_t'(diff);
  end

  qnm_mem #(.DEPTH(MAXW), .WIDTH(QNMW)) u_qnm_mem (
    .clk, .wr_en(rd_valid), .wr_addr(rd_k), .wr_data(qnm),
    .rd_addr(wr_k), .rd_data(qnm_rd)
  );

  cn_min_finder u_rm (
    .clk, .rst_n, .init(layer_start), .en(rd_valid), .qnm, .col(rd_col),
    .msg
  );

  assign cn_wr_en  = fin;
  assign cn_wr_msg = msg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   msg_hold <= '0;
    else if (fin) msg_hold <= msg;
  end

  assign msg_new = fin ? msg : msg_hold;

  cn_r_select u_rnew (
    .msg(msg_new), .col(wr_col), .zero(1'b0), .r(r_new)
  );

  always_comb begin
    sum = (QW+1)'(qnm_rd) + (QW+1)'(r_new);
    if (sum > 31)       qn_out = qn_t'(31);
    else if (sum < -31) qn_out = qn_t'(-31);
    else                qn_out = qn_t'(sum);
  end

endmodule
