// Busy/free bookkeeping of the context tree and context area allocator.
//
// Every tree memory word (slot) has a busy bit. The bits sit in a
// LINES x LINE_BITS memory (41 x 32 = 1312 bits), and each memory line has
// one more bit in the LINES-bit "line free" register, which works like the
// valid bits of a direct-mapped cache: a slot is busy only if its line is
// valid AND its own bit is set. Clearing the register (block_reset) frees
// every slot in one cycle, without walking the memory.
//
// Reading (rd_en, rd_slot) returns rd_busy one cycle later and keeps the
// line word; mark (mark_slot) must follow a read of the same line and
// writes that word back with the slot's bit set, or, if the line was
// invalid, with only that bit set, and validates the line.
//
// The busy area generator hands out context areas: next_area starts at 1
// after block_reset (area 0 is the tree root, the empty context) and
// advances on alloc; area_avail drops when all 2^AREA_W - 1 areas are used.
//
// The memory shape, the line register and the AND that forms "free" follow
// the modeller's diagram and its description; the sequential allocator and
// the read-before-mark rule are this design's own.
module area_free_tracker
  import lossless_pkg::*;
#(
  parameter int unsigned LINES     = 41,
  parameter int unsigned LINE_BITS = 32,
  parameter int unsigned SLOT_W    = $clog2(LINES * LINE_BITS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              block_reset,
  input  logic              rd_en,
  input  logic [SLOT_W-1:0] rd_slot,
  output logic              rd_busy,
  input  logic              mark,
  input  logic [SLOT_W-1:0] mark_slot,
  input  logic              alloc,
  output logic [AREA_W-1:0] next_area,
  output logic              area_avail
);

  localparam int unsigned LINE_W = $clog2(LINES);
  localparam int unsigned BIT_W  = $clog2(LINE_BITS);

  logic [LINE_BITS-1:0] mem [LINES];
  logic [LINES-1:0]     line_valid;
  logic [LINE_BITS-1:0] word_q;
  logic [SLOT_W-1:0]    rd_slot_q;
  logic [LINE_W-1:0]    rd_line, mk_line;
  logic [BIT_W-1:0]     mk_bit;
  logic                 word_valid_q;

  assign rd_line = LINE_W'(rd_slot / SLOT_W'(LINE_BITS));
  assign mk_line = LINE_W'(mark_slot / SLOT_W'(LINE_BITS));
  assign mk_bit  = BIT_W'(mark_slot % SLOT_W'(LINE_BITS));

  // busy = line valid AND slot bit
  assign rd_busy = word_valid_q && word_q[BIT_W'(rd_slot_q % SLOT_W'(LINE_BITS))];

  logic [LINE_BITS-1:0] word_marked;
  assign word_marked = (word_valid_q ? word_q : '0) | (LINE_BITS'(1) << mk_bit);

  // the held word stays current after a mark, so a later mark of the same
  // line without a new read still sees the earlier ones
  always_ff @(posedge clk) begin
    if (rd_en)     word_q <= mem[rd_line];
    else if (mark) word_q <= word_marked;
    if (mark) mem[mk_line] <= word_marked;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      line_valid   <= '0;
      word_valid_q <= 1'b0;
      rd_slot_q    <= '0;
      next_area    <= AREA_W'(1);
      area_avail   <= 1'b1;
    end else if (block_reset) begin
      line_valid   <= '0;
      word_valid_q <= 1'b0;
      next_area    <= AREA_W'(1);
      area_avail   <= 1'b1;
    end else begin
      if (rd_en) begin
        word_valid_q <= line_valid[rd_line];
        rd_slot_q    <= rd_slot;
      end
      if (mark) begin
        line_valid[mk_line] <= 1'b1;
        // the held word now has the slot set
        if (!rd_en) begin
          word_valid_q <= 1'b1;
        end
      end
      if (alloc && area_avail) begin
        next_area <= next_area + 1'b1;
        if (next_area == '1) area_avail <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   mark |-> (mk_line == LINE_W'(rd_slot_q / SLOT_W'(LINE_BITS))))
    else $error("mark without a read of the same line");

endmodule
