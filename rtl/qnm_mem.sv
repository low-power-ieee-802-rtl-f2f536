// qnm_mem: Qnm memory of one check node datapath, 24 words of 6 bits.
//
// During the first half of a layer the datapath writes the value Qnm
// (total value minus old check message) of the k-th sub-matrix to word k;
// during the second half it reads word k back to add the new check message.
// Synchronous write, asynchronous read (a small distributed RAM), so the
// second half needs no extra pipeline stage.
module qnm_mem #(
  parameter int unsigned DEPTH = 24,
  parameter int unsigned WIDTH = 6,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];

endmodule
