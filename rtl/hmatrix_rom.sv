// hmatrix_rom: processing-order table of the parity check matrix.
//
// For a code rate, a layer (a block row of 27 check equations) and a
// position k within that layer, gives the block column and cyclic shift of
// the k-th non-zero sub-matrix, plus the number of non-zero sub-matrices in
// the layer (its weight) and the number of layers of the rate. Rate 1/2 has
// 12 layers of weight 7 or 8, rate 5/6 has 4 layers of weight 22.
//
// The table is built at elaboration from the base matrices in ldpc_pkg, so
// the hardware is a small ROM. Sub-matrices of a layer are visited in
// ascending block column order; that order is this design's choice.
// Purely combinational; k must be below the weight for the entry to be
// meaningful (entries past the weight read as zero).
module hmatrix_rom
  import ldpc_pkg::*;
(
  input  rate_e                 rate,
  input  logic [LAYW-1:0]       layer,
  input  logic [KW-1:0]         k,
  output hent_t                 ent,
  output logic [KW-1:0]         weight,
  output logic [LAYW-1:0]       nlayers
);

  typedef hent_t    [MAXL-1:0][MAXW-1:0] tab_t;
  typedef logic [MAXL-1:0][KW-1:0]      wtab_t;

  function automatic tab_t build_tab(rate_e r);
    tab_t t = '0;
    for (int l = 0; l < int'(MAXL); l++) begin
      int n = 0;
      for (int c = 0; c < int'(NB); c++) begin
        int s = bm_entry(r, l, c);
        if (s >= 0) begin
          t[l][n].col   = COLW'(c);
          t[l][n].shift = SHW'(s);
          n++;
        end
      end
    end
    return t;
  endfunction

  function automatic wtab_t build_w(rate_e r);
    wtab_t w = '0;
    for (int l = 0; l < int'(MAXL); l++) begin
      int n = 0;
      for (int c = 0; c < int'(NB); c++)
        if (bm_entry(r, l, c) >= 0) n++;
      w[l] = KW'(n);
    end
    return w;
  endfunction

  localparam tab_t  TAB12 = build_tab(RATE_1_2);
  localparam tab_t  TAB56 = build_tab(RATE_5_6);
  localparam wtab_t W12   = build_w(RATE_1_2);
  localparam wtab_t W56   = build_w(RATE_5_6);

  always_comb begin
    ent     = '0;
    weight  = '0;
    nlayers = (rate == RATE_1_2) ? LAYW'(12) : LAYW'(4);
    if (layer < LAYW'(MAXL) && k < KW'(MAXW)) begin
      if (rate == RATE_1_2) begin
        ent    = TAB12[layer][k];
        weight = W12[layer];
      end else begin
        ent    = TAB56[layer][k];
        weight = W56[layer];
      end
    end
  end

endmodule
