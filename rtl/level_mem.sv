// level_mem: the memory bank of one level of the prefix tree.
//
// Each level of the lookup pipeline has a memory of its own, so that the five
// accesses of one lookup fall in five different memories and the pipeline can
// start a new lookup every cycle. The bank is modelled as a plain array with
// one synchronous read port (for the pipeline) and one synchronous write port
// (for the forwarding-table download from the network processor).
//
// Timing: rd_data shows mem[rd_addr] one clock after rd_en is sampled high and
// holds its value while rd_en is low. A write takes effect at the clock edge
// that samples wr_en; a read of the same address in that cycle returns the old
// entry. The separate write port is this design's choice; the published design
// only says that the tables are downloaded into the engines. The defaults are
// the size of the level-2 bank: 2^22 entries of 16 bits.
module level_mem #(
  parameter int unsigned AW = 22,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
