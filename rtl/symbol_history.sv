// Symbol history ("symbols value FIFO") of the general-data modeller.
//
// Keeps the DEPTH most recent symbols of the current block; hist[0] is the
// symbol just before the one being modelled, hist[1] the one before that,
// and so on. They are the context that the modeller looks up in the
// context tree, level by level. `push` shifts a new symbol in; `clear`
// empties the history at a block boundary (count returns to 0), so no
// context crosses a block. count says how many entries are valid (at most
// DEPTH). One cycle from push to the new hist.
//
// Depth 3 and width 8 are the figures of the modeller's diagram; making the
// FIFO a shift register with all entries visible is this design's choice.
module symbol_history #(
  parameter int unsigned DEPTH = 3,
  parameter int unsigned WIDTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  output logic [WIDTH-1:0]           hist [DEPTH],
  output logic [$clog2(DEPTH+1)-1:0] count
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < DEPTH; i++) hist[i] <= '0;
      count <= '0;
    end else if (push) begin
      hist[0] <= din;
      for (int i = 1; i < DEPTH; i++) hist[i] <= hist[i-1];
      if (count != ($clog2(DEPTH+1))'(DEPTH)) count <= count + 1'b1;
    end
  end

endmodule
