// Context tree memory of the general-data modeller.
//
// One word per tree node: {context area, parent (prefix) context area,
// context symbol}, 10 + 10 + 8 bits. The word's address is a hash of the
// parent area and the symbol, so finding a child is one read. The memory
// is a plain single-port-read, single-port-write synchronous SRAM: the read
// word appears one cycle after rd_en. Whether a word holds a live node is
// not stored here but in area_free_tracker, so the memory itself never
// needs clearing.
//
// The three sections and their widths and the depth of 1312 words come
// from the modeller's diagram.
module context_tree_sram
  import lossless_pkg::*;
#(
  parameter int unsigned DEPTH  = 1312,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  tree_node_t        wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output tree_node_t        rd_data
);

  tree_node_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
