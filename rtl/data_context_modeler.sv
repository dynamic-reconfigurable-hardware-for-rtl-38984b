// General-data context modeller: a hashed context tree with single-cycle
// block reset.
//
// For every input byte X the modeller looks up its context, the ORDER
// bytes before it, in a tree built from the data seen so far in the block.
// Each tree node has a context area number (the estimator's context for
// that node), its parent's area and the byte that leads to it. Children
// are found by hashing instead of by pointers from the parent:
//   index = ({byte, 2'b00} XOR parent_area) + probe
// ("hashing shift", XOR, index calculation). A lookup at level j reads
// the tree memory and the busy bit at that index (one cycle), then
// compares: a busy word with the same parent and byte is a match, and the
// walk goes one level deeper from the matched area. A free word means the
// context is new: a node with the next free area is written there and the
// walk stops (a new node has no children). A busy word of another node is
// a collision: the next index is tried, up to MAX_PROBE indices, then the
// walk stops. Indices reach 1023 + MAX_PROBE - 1, inside the 1312 words.
//
// The areas matched (order 1, 2, 3 in turn) go into the fill bank of the
// double buffer, which is then committed with X. out_ctx is the deepest
// matched area, or 0 (the empty, order-0 context) if none matched. After
// the last byte of a block the busy bits and the area allocator are reset
// in one cycle, and the history is emptied.
//
// Timing: one cycle to take the byte, two per level, one to commit: at
// most 8 cycles per byte without collisions. Interfaces are valid/ready.
//
// Follows the modeller's description and diagram: symbol FIFO of 3, 10-bit
// hash, 11-bit index, 1312-word tree memory with its three sections, match
// on parent area and symbol, area-free memory with line-valid register,
// busy area generator, two context area buffers. The hash shift amount,
// the probe limit, stopping at a new node and choosing the deepest match as
// the coding context are this design's own.
module data_context_modeler
  import lossless_pkg::*;
#(
  parameter int unsigned ORDER      = 3,
  parameter int unsigned TREE_DEPTH = 1312,
  parameter int unsigned LINE_BITS  = 32,
  parameter int unsigned MAX_PROBE  = 4,
  parameter int unsigned CNT_W      = $clog2(ORDER + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [SYM_W-1:0]  in_sym,
  input  logic              in_last,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [SYM_W-1:0]  out_sym,
  output logic [AREA_W-1:0] out_ctx,
  output logic              out_last,
  output logic [CNT_W-1:0]  out_count,
  output logic [AREA_W-1:0] out_areas [ORDER]
);

  localparam int unsigned IDX_W = $clog2(TREE_DEPTH);
  localparam int unsigned LVL_W = (ORDER > 1) ? $clog2(ORDER) : 1;
  localparam int unsigned PRB_W = (MAX_PROBE > 1) ? $clog2(MAX_PROBE) : 1;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_EVAL, S_COMMIT} state_e;
  state_e st_q;

  logic [SYM_W-1:0]  x_q;
  logic              last_q;
  logic [LVL_W-1:0]  lvl_q;
  logic [PRB_W-1:0]  probe_q;
  logic [AREA_W-1:0] parent_q;
  logic [IDX_W-1:0]  idx_q;

  // symbol history
  logic [SYM_W-1:0]  hist [ORDER];
  logic [CNT_W-1:0]  hcount;
  logic              h_push, h_clear;

  // tree memory and busy bits
  tree_node_t        node_rd, node_wr;
  logic              rd_en, wr_en, busy, alloc, area_avail, blk_rst;
  logic [IDX_W-1:0]  idx;
  logic [AREA_W-1:0] next_area;
  logic [SYM_W-1:0]  ctx_sym;
  logic              match;

  // double buffer
  logic              fill_ready, push, commit;

  assign ctx_sym = hist[lvl_q];
  // hashing shift, XOR with the parent's area, index calculation
  assign idx     = IDX_W'({ctx_sym, 2'b00} ^ parent_q) + IDX_W'(probe_q);
  assign match   = busy && node_rd.prefix == parent_q && node_rd.sym == ctx_sym;

  assign in_ready = (st_q == S_IDLE) && fill_ready;
  assign rd_en    = (st_q == S_READ);
  assign wr_en    = (st_q == S_EVAL) && !busy && area_avail;
  assign alloc    = wr_en;
  assign node_wr  = '{area: next_area, prefix: parent_q, sym: ctx_sym};
  assign push     = (st_q == S_EVAL) && match;
  assign commit   = (st_q == S_COMMIT);
  assign h_push   = commit;
  assign h_clear  = commit && last_q;
  assign blk_rst  = commit && last_q;

  symbol_history #(.DEPTH(ORDER), .WIDTH(SYM_W)) u_hist (
    .clk, .rst_n, .clear (h_clear), .push (h_push), .din (x_q),
    .hist, .count (hcount)
  );

  context_tree_sram #(.DEPTH(TREE_DEPTH)) u_tree (
    .clk, .wr_en, .wr_addr (idx_q), .wr_data (node_wr),
    .rd_en, .rd_addr (idx), .rd_data (node_rd)
  );

  area_free_tracker #(.LINES(TREE_DEPTH / LINE_BITS), .LINE_BITS(LINE_BITS)) u_free (
    .clk, .rst_n, .block_reset (blk_rst),
    .rd_en, .rd_slot (idx), .rd_busy (busy),
    .mark (wr_en), .mark_slot (idx_q),
    .alloc, .next_area, .area_avail
  );

  context_area_buffer #(.DEPTH(ORDER)) u_buf (
    .clk, .rst_n, .fill_ready,
    .push, .push_area (node_rd.area),
    .commit, .commit_sym (x_q), .commit_last (last_q),
    .out_valid, .out_ready, .out_count, .out_areas, .out_sym, .out_last
  );

  // deepest matched context, order 0 if none
  always_comb begin
    out_ctx = '0;
    for (int i = 0; i < ORDER; i++) begin
      if (CNT_W'(i) < out_count) out_ctx = out_areas[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q     <= S_IDLE;
      x_q      <= '0;
      last_q   <= 1'b0;
      lvl_q    <= '0;
      probe_q  <= '0;
      parent_q <= '0;
      idx_q    <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (in_valid && in_ready) begin
          x_q      <= in_sym;
          last_q   <= in_last;
          lvl_q    <= '0;
          probe_q  <= '0;
          parent_q <= '0;
          st_q     <= (hcount == '0) ? S_COMMIT : S_READ;
        end
        S_READ: begin
          idx_q <= idx;
          st_q  <= S_EVAL;
        end
        S_EVAL: begin
          if (match) begin
            parent_q <= node_rd.area;
            probe_q  <= '0;
            lvl_q    <= lvl_q + 1'b1;
            st_q     <= (CNT_W'(lvl_q) + 1'b1 == hcount) ? S_COMMIT : S_READ;
          end else if (busy && probe_q != PRB_W'(MAX_PROBE - 1)) begin
            probe_q <= probe_q + 1'b1;
            st_q    <= S_READ;
          end else begin
            st_q <= S_COMMIT;
          end
        end
        S_COMMIT: st_q <= S_IDLE;
        default:  st_q <= S_IDLE;
      endcase
    end
  end

endmodule
