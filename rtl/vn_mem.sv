// vn_mem: variable node memory, 24 words of 162 bits.
//
// Word c holds the 27 six-bit total values Qn of block column c. One
// synchronous read port (data appears the cycle after the address) and one
// synchronous write port, as a simple dual-port block RAM. A read and a
// write to the same address in the same cycle return the old word. Contents
// are not reset; the decoder loads every word before decoding.
module vn_mem #(
  parameter int unsigned DEPTH = 24,
  parameter int unsigned WIDTH = 162,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
