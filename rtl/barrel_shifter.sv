// barrel_shifter: cyclic rotation of a word of Z lanes by 0..Z-1 lanes.
//
// Lane r of the output takes lane (r + amt) mod Z of the input, so a word
// holding the Z variable node values of one block column in natural order,
// rotated by the shift s of an identity sub-matrix, hands check row r of the
// layer the variable it is connected to. It is the decoder's read barrel
// shifter; with differential shifting the amount is the difference between
// the wanted shift and the rotation the word is stored in.
//
// Built as log2 stages of fixed rotations (1, 2, 4, 8, 16 lanes) modulo Z,
// purely combinational. amt must be below Z.
module barrel_shifter #(
  parameter int unsigned LANES = 27,
  parameter int unsigned W     = 6,
  parameter int unsigned AW    = $clog2(LANES)
) (
  input  logic [LANES*W-1:0] din,
  input  logic [AW-1:0]      amt,
  output logic [LANES*W-1:0] dout
);

  logic [LANES*W-1:0] stage [AW+1];

  assign stage[0] = din;

  for (genvar b = 0; b < int'(AW); b++) begin : g_stage
    localparam int unsigned STEP = (1 << b) % LANES;
    for (genvar r = 0; r < int'(LANES); r++) begin : g_lane
      localparam int unsigned SRC = (r + STEP) % LANES;
      assign stage[b+1][r*W +: W] = amt[b] ? stage[b][SRC*W +: W]
                                           : stage[b][r*W +: W];
    end
  end

  assign dout = stage[AW];

endmodule
