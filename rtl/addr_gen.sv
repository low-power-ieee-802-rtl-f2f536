// addr_gen: controller and address generation of the decoder.
//
// After start it runs `iters` iterations over all layers of the selected
// code rate, then reads the decoded word out. Two sequencers share the work:
//
//   read sequencer   issues one variable node memory read per cycle, the
//                    non-zero sub-matrices of each layer in table order
//   write sequencer  once the last read of a layer has passed the datapaths
//                    (fin), returns the layer's w updated words, one per cycle
//
// The read pass of the next layer overlaps the write pass of the layer
// before it. Layered decoding needs every read to see the newest value, so
// a read of block column c stalls while c is still pending (read by an
// earlier layer and not yet written back). At most two layers are in
// flight: a new layer starts reading only once the layer two before it has
// been written, and a layer's fin waits until the write sequencer is free.
// The results are therefore the same as with a strict read-then-write
// schedule; only the cycle count differs (about w + 4 cycles per layer of
// weight w instead of 2w + 3, depending on the column order).
//
// Differential shifting: new values are written back without being
// shifted back, so each word stays rotated by the shift of the sub-matrix
// that last wrote it. rot[c] keeps that rotation; a read of column c for a
// sub-matrix of shift s is rotated by (s - rot[c]) mod 27 and the write
// sets rot[c] = s. The output pass rotates by (0 - rot[c]) mod 27 so words
// leave in natural order. A word loaded from outside (ld_valid) is in
// natural order, rot = 0. Keeping rot in registers rather than in a
// precomputed table is this design's choice, as are the stall rules.
//
// Pipeline tags: s1_* go with the memory output (shift amount, layer for
// the check node memory read), s2_* with the 162-bit register that feeds
// the datapaths (or the output port). done pulses one cycle after the last
// output word.
module addr_gen
  import ldpc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // command
  input  logic            start,
  input  rate_e           rate_in,
  input  logic [3:0]      iters_in,
  output logic            busy,
  output logic            done,
  // loading of a word from outside
  input  logic            ld_valid,
  input  logic [COLW-1:0] ld_col,
  // variable node memory read and read barrel shifter
  output logic            vn_rd_en,
  output logic [COLW-1:0] vn_rd_addr,
  output logic [SHW-1:0]  s1_shift,
  output logic [LAYW-1:0] s1_layer,
  // datapath read pass (aligned with the 162-bit register)
  output logic            s2_valid,
  output logic [KW-1:0]   s2_k,
  output logic [COLW-1:0] s2_col,
  output logic            s2_first,
  output logic            s2_out,
  // end of a layer's read pass, write pass
  output logic            fin,
  output logic [LAYW-1:0] fin_layer,
  output logic            wr_valid,
  output logic [KW-1:0]   wr_k,
  output logic [COLW-1:0] wr_col,
  // observation: rate being decoded, iteration of the read sequencer
  output rate_e           rate,
  output logic [3:0]      iter
);

  typedef enum logic [1:0] {IDLE, RUN, FLUSH, OUT} state_e;

  state_e           state;
  logic [3:0]       iters;
  // read sequencer
  logic [LAYW-1:0]  r_layer;
  logic [KW-1:0]    r_k;
  hent_t            r_ent;
  logic [KW-1:0]    r_weight;
  logic [LAYW-1:0]  nlayers;
  logic             issue, new_layer_ok;
  // write sequencer
  logic             w_active;
  logic [KW-1:0]    w_k, w_idx, w_weight;
  hent_t            w_ent;
  logic [LAYW-1:0]  w_nl_unused;
  logic             fin_wait;
  logic [1:0]       inflight;
  logic             w_last;
  // shared
  logic [NB-1:0]    pending;
  logic [SHW-1:0]   rot [NB];
  logic [SHW-1:0]   want, diff;
  logic [COLW-1:0]  out_k;
  logic             out_issue;
  logic             s1_valid, s1_out, s1_last, s1_first;
  logic [KW-1:0]    s1_k;
  logic [COLW-1:0]  s1_col;
  logic             s2_last;
  logic [LAYW-1:0]  s2_layer;
  logic [1:0]       odrain;

  hmatrix_rom u_rom_rd (
    .rate, .layer(r_layer), .k(r_k), .ent(r_ent), .weight(r_weight), .nlayers
  );

  hmatrix_rom u_rom_wr (
    .rate, .layer(fin_layer), .k(w_idx), .ent(w_ent), .weight(w_weight),
    .nlayers(w_nl_unused)
  );

  // ---------------------------------------------------------------- read
  // A new layer may start when at most one other layer is in flight.
  assign new_layer_ok = (r_k != '0) || (inflight <= 2'd1);
  assign issue        = (state == RUN) && new_layer_ok && !pending[r_ent.col];
  assign out_issue    = (state == OUT) && (odrain == '0);

  always_comb begin
    vn_rd_en   = issue || out_issue;
    vn_rd_addr = out_issue ? out_k : r_ent.col;
    want       = out_issue ? '0 : r_ent.shift;
    // (want - rot) mod Z, both below Z
    if (want >= rot[vn_rd_addr]) diff = want - rot[vn_rd_addr];
    else                         diff = SHW'(want + SHW'(Z) - rot[vn_rd_addr]);
  end

  // --------------------------------------------------------------- write
  // fin: the last read of a layer has been absorbed by the datapaths and
  // the write sequencer is free; the write pass starts in the same cycle.
  assign fin      = fin_wait && !w_active;
  assign w_idx    = fin ? '0 : w_k;
  assign wr_valid = fin || w_active;
  assign wr_k     = w_idx;
  assign wr_col   = w_ent.col;
  assign w_last   = wr_valid && (w_idx == w_weight - 1'b1);

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      rate      <= RATE_1_2;
      iters     <= '0;
      iter      <= '0;
      r_layer   <= '0;
      r_k       <= '0;
      w_active  <= 1'b0;
      w_k       <= '0;
      fin_wait  <= 1'b0;
      fin_layer <= '0;
      inflight  <= '0;
      pending   <= '0;
      out_k     <= '0;
      odrain    <= '0;
      done      <= 1'b0;
      for (int c = 0; c < int'(NB); c++) rot[c] <= '0;
    end else begin
      done <= 1'b0;

      // loads (only while idle, gated outside)
      if (state == IDLE && ld_valid) rot[ld_col] <= '0;

      // write sequencer
      if (wr_valid) begin
        rot[w_ent.col] <= w_ent.shift;
        if (w_last) begin
          w_active <= 1'b0;
          w_k      <= '0;
        end else begin
          w_active <= 1'b1;
          w_k      <= w_idx + 1'b1;
        end
      end
      if (fin) fin_wait <= 1'b0;
      if (s2_valid && s2_last) begin
        fin_wait  <= 1'b1;
        fin_layer <= s2_layer;
      end

      // pending columns: set on a read, cleared on the write-back
      for (int c = 0; c < int'(NB); c++) begin
        if (issue && r_ent.col == COLW'(c))          pending[c] <= 1'b1;
        else if (wr_valid && w_ent.col == COLW'(c))  pending[c] <= 1'b0;
      end

      // layers in flight: from first read to last write
      inflight <= inflight + ((issue && r_k == '0) ? 2'd1 : 2'd0)
                           - (w_last ? 2'd1 : 2'd0);

      case (state)
        IDLE: begin
          if (start) begin
            rate    <= rate_in;
            iters   <= (iters_in == '0) ? 4'd1 : iters_in;
            iter    <= '0;
            r_layer <= '0;
            r_k     <= '0;
            state   <= RUN;
          end
        end
        RUN: begin
          if (issue) begin
            if (r_k == r_weight - 1'b1) begin
              r_k <= '0;
              if (r_layer == nlayers - 1'b1) begin
                r_layer <= '0;
                if (iter == iters - 1'b1) state <= FLUSH;
                else iter <= iter + 1'b1;
              end else r_layer <= r_layer + 1'b1;
            end else r_k <= r_k + 1'b1;
          end
        end
        FLUSH: begin
          // wait until the last layer has been written back
          if (inflight == '0 && !fin_wait && !s1_valid && !s2_valid) begin
            out_k <= '0;
            state <= OUT;
          end
        end
        OUT: begin
          if (odrain == '0) begin
            if (out_k == COLW'(NB - 1)) odrain <= 2'd1;
            else out_k <= out_k + 1'b1;
          end else if (odrain == 2'd2) begin
            odrain <= '0;
            done   <= 1'b1;
            state  <= IDLE;
          end else odrain <= odrain + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Pipeline tags.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_out <= 1'b0; s1_last <= 1'b0; s1_first <= 1'b0;
      s1_k <= '0; s1_col <= '0; s1_shift <= '0; s1_layer <= '0;
      s2_valid <= 1'b0; s2_out <= 1'b0; s2_last <= 1'b0; s2_first <= 1'b0;
      s2_k <= '0; s2_col <= '0; s2_layer <= '0;
    end else begin
      s1_valid <= issue;
      s1_out   <= out_issue;
      s1_last  <= issue && (r_k == r_weight - 1'b1);
      s1_first <= (iter == '0);
      s1_k     <= out_issue ? KW'(out_k) : r_k;
      s1_col   <= vn_rd_addr;
      s1_shift <= diff;
      s1_layer <= r_layer;
      s2_valid <= s1_valid;
      s2_out   <= s1_out;
      s2_last  <= s1_last;
      s2_first <= s1_first;
      s2_k     <= s1_k;
      s2_col   <= s1_col;
      s2_layer <= s1_layer;
    end
  end

  // A read never targets a column whose write-back is outstanding, and the
  // write port is never asked for a second layer at once.
  a_no_stale_read: assert property (@(posedge clk) disable iff (!rst_n)
    issue |-> !pending[r_ent.col]);
  a_shift_range: assert property (@(posedge clk) disable iff (!rst_n)
    vn_rd_en |-> diff < SHW'(Z));
  a_inflight: assert property (@(posedge clk) disable iff (!rst_n)
    inflight <= 2'd2);

endmodule
