// cn_mem: check node memory of one check node datapath, 12 words of 38 bits.
//
// Word l holds the compressed check node message (cn_msg_t) that this
// datapath's check row produced in layer l in the previous iteration. One
// synchronous read port and one synchronous write port; a read and a write
// of the same word in the same cycle return the old word. Not reset: the
// datapath ignores what it reads in the first iteration of a codeword.
module cn_mem #(
  parameter int unsigned DEPTH = 12,
  parameter int unsigned WIDTH = 38,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
