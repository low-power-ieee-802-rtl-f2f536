// ldpc_pkg: sizes, message formats and base matrices shared by the
// 802.11n (n = 648) layered min-sum LDPC decoder.
//
// The code is quasi-cyclic: the parity check matrix is a grid of 27x27
// sub-matrices, each either all zero or a cyclically shifted identity. A
// base matrix entry of -1 marks a zero sub-matrix, an entry s >= 0 an
// identity shifted so that row r of the block is connected to column
// (r + s) mod 27 of that block column. The decoder holds two base matrices,
// code rate 1/2 (12 layers) and 5/6 (4 layers), both with 24 block columns.
// The matrix entries are those of the IEEE 802.11n standard for Z = 27.
//
// Number formats (widths follow the decoder description; encodings are this
// design's choice):
//   Qn   total (posterior) variable node value, 6-bit two's complement,
//        saturated to [-31, 31]
//   Qnm  variable-to-check value, 6-bit two's complement, saturated to
//        [-31, 31]; its magnitude is clipped to 15 only inside the min
//        finder, where the min fields have 4 bits
//   Rmn  check-to-variable value, sign plus 4-bit magnitude, carried as a
//        5-bit two's complement number in [-15, 15]
//   cn_msg_t  38-bit compressed check node message:
//        4-bit min, 4-bit one-but-min, 5-bit index (block column of the
//        min), 24 sign bits (one per block column), 1 bit xor of the signs
package ldpc_pkg;

  localparam int unsigned Z        = 27;   // sub-matrix size, datapaths
  localparam int unsigned NB       = 24;   // block columns
  localparam int unsigned N        = Z * NB;  // 648 code bits
  localparam int unsigned QW       = 6;    // Qn width
  localparam int unsigned QNMW     = 6;    // Qnm width
  localparam int unsigned RW       = 5;    // Rmn width
  localparam int unsigned MAGW     = 4;    // min magnitude width
  localparam int unsigned MAXL     = 12;   // most layers (rate 1/2)
  localparam int unsigned MAXW     = 24;   // most sub-matrices per layer
  localparam int unsigned WORDW    = Z * QW;  // 162-bit memory word
  localparam int unsigned COLW     = 5;    // block column index width
  localparam int unsigned SHW      = 5;    // shift amount width
  localparam int unsigned LAYW     = 4;    // layer index width
  localparam int unsigned KW       = 5;    // sub-matrix counter width

  typedef enum logic {RATE_1_2 = 1'b0, RATE_5_6 = 1'b1} rate_e;

  typedef logic signed [QW-1:0]   qn_t;
  typedef logic signed [QNMW-1:0] qnm_t;
  typedef logic signed [RW-1:0]   r_t;
  typedef logic [WORDW-1:0]       word_t;

  typedef struct packed {
    logic [MAGW-1:0] min1;
    logic [MAGW-1:0] min2;
    logic [COLW-1:0] idx;
    logic [NB-1:0]   signs;
    logic            xsign;
  } cn_msg_t;   // 38 bits

  // One entry of the processing order: block column and its shift.
  typedef struct packed {
    logic [COLW-1:0] col;
    logic [SHW-1:0]  shift;
  } hent_t;

  // IEEE 802.11n base matrices, Z = 27.
  localparam int BM12 [12][24] = '{
    '{ 0,-1,-1,-1, 0, 0,-1,-1, 0,-1,-1, 0, 1, 0,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1},
    '{22, 0,-1,-1,17,-1, 0, 0,12,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1,-1,-1,-1},
    '{ 6,-1, 0,-1,10,-1,-1,-1,24,-1, 0,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1,-1,-1},
    '{ 2,-1,-1, 0,20,-1,-1,-1,25, 0,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1,-1},
    '{23,-1,-1,-1, 3,-1,-1,-1, 0,-1, 9,11,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1},
    '{24,-1,23, 1,17,-1, 3,-1,10,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1},
    '{25,-1,-1,-1, 8,-1,-1,-1, 7,18,-1,-1, 0,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1},
    '{13,24,-1,-1, 0,-1, 8,-1, 6,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1},
    '{ 7,20,-1,16,22,10,-1,-1,23,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1},
    '{11,-1,-1,-1,19,-1,-1,-1,13,-1, 3,17,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1},
    '{25,-1, 8,-1,23,18,-1,14, 9,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0},
    '{ 3,-1,-1,-1,16,-1,-1, 2,25, 5,-1,-1, 1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0}
  };

  localparam int BM56 [4][24] = '{
    '{17,13, 8,21, 9, 3,18,12,10, 0, 4,15,19, 2, 5,10,26,19,13,13, 1, 0,-1,-1},
    '{ 3,12,11,14,11,25, 5,18, 0, 9, 2,26,26,10,24, 7,14,20, 4, 2,-1, 0, 0,-1},
    '{22,16, 4, 3,10,21,12, 5,21,14,19, 5,-1, 8, 5,18,11, 5, 5,15, 0,-1, 0, 0},
    '{ 7, 7,14,14, 4,16,16,24,24,10, 1, 7,15, 6,10,26, 8,18,21,14, 1,-1,-1, 0}
  };

  // Base matrix entry, -1 for a zero sub-matrix.
  function automatic int bm_entry(rate_e rate, int layer, int col);
    if (rate == RATE_1_2) return BM12[layer][col];
    else                  return (layer < 4) ? BM56[layer][col] : -1;
  endfunction

  function automatic int num_layers(rate_e rate);
    return (rate == RATE_1_2) ? 12 : 4;
  endfunction

  // Saturate an integer into [-lim, lim].
  function automatic int sat(int v, int lim);
    if (v > lim)  return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

endpackage
