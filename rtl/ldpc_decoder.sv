// ldpc_decoder: hybrid layered min-sum LDPC decoder for the IEEE 802.11n
// codes of block length 648 (code rates 1/2 and 5/6).
//
// The 648 channel values are held as 24 words of 27 six-bit values in the
// variable node memory, one word per block column. A layer of the parity
// check matrix (27 check rows) is processed by 27 check node datapaths in
// parallel, one word per cycle: the word is read, rotated by the read barrel
// shifter so that lane r carries the variable connected to check row r,
// registered (162-bit register) and handed to the datapaths. Each datapath
// keeps its row's check messages of the previous iteration in compressed
// form in its own check node memory (one 38-bit word per layer). After the
// last word of a layer the datapaths write the updated values back, with no
// write barrel shifter (differential shifting), while the next layer is
// already being read; addr_gen stalls a read whose word is not yet back.
//
// Interface
//   Load:   while idle (ld_ready), ld_valid writes ld_data, the 27 values of
//           block column ld_col in natural order (lane i = code bit
//           27*ld_col + i, value at bits 6i+5:6i, two's complement LLR,
//           positive means bit 0).
//   Decode: a start pulse with rate_sel (0: rate 1/2, 1: rate 5/6) and
//           iters (iterations, 0 is taken as 1) starts decoding; busy stays
//           high until done pulses.
//   Output: after the last iteration the 24 words are sent in column order,
//           one per cycle with out_valid: out_qn holds the 27 final values,
//           out_bits their hard decisions (bit i = sign of value i).
// Timing: a layer of weight w takes w cycles of reads plus the stalls on
// words not yet written back. With the table order the first iteration
// takes 144 cycles at rate 1/2 and 124 at rate 5/6 (pipeline fill and the
// last write pass included), each further iteration 137 and 102. The output
// pass adds 27 cycles; done comes 1 cycle after the last out_valid, e.g.
// 445 / 355 cycles from start to done for 3 iterations.
//
// The memory organisation, the 27 datapaths with per-row check memories,
// the 38-bit compressed messages and the removal of the write barrel
// shifter follow the reference architecture. The stall rules of the
// overlapped schedule, the load/output interface, the per-codeword rate
// selection and the 6-bit Qnm are this design's choices.
module ldpc_decoder
  import ldpc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // load
  input  logic                ld_valid,
  input  logic [COLW-1:0]     ld_col,
  input  logic [WORDW-1:0]    ld_data,
  output logic                ld_ready,
  // command
  input  logic                start,
  input  logic                rate_sel,
  input  logic [3:0]          iters,
  output logic                busy,
  output logic                done,
  // result
  output logic                out_valid,
  output logic [COLW-1:0]     out_col,
  output logic [WORDW-1:0]    out_qn,
  output logic [Z-1:0]        out_bits
);

  logic            vn_rd_en, vn_wr_en;
  logic [COLW-1:0] vn_rd_addr, vn_wr_addr;
  word_t           vn_rd_data, vn_wr_data, shifted, qn_reg, dp_out;
  logic [SHW-1:0]  s1_shift;
  logic            s2_valid, s2_out, s2_first;
  logic [KW-1:0]   s2_k, wr_k;
  logic [COLW-1:0] s2_col, wr_col;
  logic [LAYW-1:0] s1_layer, fin_layer;
  logic            layer_start, fin, wr_valid, ld_en;

  assign ld_ready = !busy;
  assign ld_en    = ld_valid && !busy;

  addr_gen u_addr_gen (
    .clk, .rst_n,
    .start(start && !busy), .rate_in(rate_e'(rate_sel)), .iters_in(iters),
    .busy, .done,
    .ld_valid(ld_en), .ld_col,
    .vn_rd_en, .vn_rd_addr, .s1_shift, .s1_layer,
    .s2_valid, .s2_k, .s2_col, .s2_first, .s2_out,
    .fin, .fin_layer,
    .wr_valid, .wr_k, .wr_col,
    .rate(), .iter()
  );

  assign vn_wr_en   = ld_en || wr_valid;
  assign vn_wr_addr = ld_en ? ld_col  : wr_col;
  assign vn_wr_data = ld_en ? ld_data : dp_out;

  vn_mem #(.DEPTH(NB), .WIDTH(WORDW)) u_vn_mem (
    .clk,
    .rd_en(vn_rd_en), .rd_addr(vn_rd_addr), .rd_data(vn_rd_data),
    .wr_en(vn_wr_en), .wr_addr(vn_wr_addr), .wr_data(vn_wr_data)
  );

  barrel_shifter #(.LANES(Z), .W(QW)) u_read_shifter (
    .din(vn_rd_data), .amt(s1_shift), .dout(shifted)
  );

  // 162-bit register between the read barrel shifter and the datapaths.
  always_ff @(posedge clk) qn_reg <= shifted;

  // The min finders restart with the first value of each layer.
  assign layer_start = s2_valid && (s2_k == '0);

  for (genvar r = 0; r < int'(Z); r++) begin : g_dp
    cn_msg_t cn_rd, cn_wr;
    logic    cn_we;
    qn_t     qn_o;

    cn_mem #(.DEPTH(MAXL), .WIDTH($bits(cn_msg_t))) u_cn_mem (
      .clk, .rd_addr(s1_layer), .rd_data(cn_rd),
      .wr_en(cn_we), .wr_addr(fin_layer), .wr_data(cn_wr)
    );

    cn_datapath u_dp (
      .clk, .rst_n, .first_iter(s2_first), .layer_start,
      .rd_valid(s2_valid), .rd_k(s2_k), .rd_col(s2_col),
      .qn_in(qn_t'(qn_reg[r*QW +: QW])), .cn_rd_msg(cn_rd),
      .fin, .cn_wr_en(cn_we), .cn_wr_msg(cn_wr),
      .wr_k, .wr_col, .qn_out(qn_o)
    );

    assign dp_out[r*QW +: QW] = qn_o;
    assign out_bits[r]        = qn_reg[r*QW + QW - 1];
  end

  assign out_valid = s2_out;
  assign out_col   = s2_col;
  assign out_qn    = qn_reg;

endmodule
