// Probability estimator: binary decomposition of symbols with adaptive nodes.
//
// Every 8-bit symbol is coded as the path from the root to a leaf of a
// binary tree of 255 nodes: decision i (i = 0..7, most significant bit
// first) is symbol bit 7-i, and it is coded in node
//   node_i = 2^i + (symbol >> (8-i))          (heap numbering, 1..255).
// Each context (2^CTX_W of them, 1024 by default) has its own tree, so the
// probability memory holds 2^CTX_W x 256 entries of {MPS, 6-bit state}.
// For each decision the node is read, the decision goes to the arithmetic
// coder together with the node's MPS and state, and when the coder takes it
// the node is written back with lossless_pkg::next_state. Two consecutive
// decisions never use the same node (they lie at different tree depths), so
// the one-cycle read/write pipeline needs no forwarding, and one decision
// leaves per clock.
//
// Interface: symbols with their context number in (valid/ready), decisions
// out (valid/ready, `last` on the final decision of the block). After reset
// or a `clear` pulse the memory is set to state 0, MPS 0 over 2^(CTX_W+8)
// cycles (busy high, in_ready low).
//
// Follows the design description in coding each symbol as binary events on
// a tree per context with a context population of 1024. The original
// estimator's details (frequency counts in a total value memory, 9 events per
// symbol) are not reproduced: this design's nodes hold a small adaptive
// state machine instead and use 8 events per symbol.
module probability_estimator
  import lossless_pkg::*;
#(
  parameter int unsigned CTX_W = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  output logic      busy,
  input  logic      in_valid,
  output logic      in_ready,
  input  logic [SYM_W-1:0] in_sym,
  input  logic [CTX_W-1:0] in_ctx,
  input  logic      in_last,
  output logic      out_valid,
  input  logic      out_ready,
  output decision_t out_dec
);

  localparam int unsigned ADDR_W = CTX_W + SYM_W;

  logic [STATE_W:0] mem [2**ADDR_W];   // {mps, state}

  // clear sequencer
  logic              clr_q;
  logic [ADDR_W-1:0] clr_addr;

  // symbol being decomposed
  logic              have_q, last_q;
  logic [SYM_W-1:0]  sym_q;
  logic [CTX_W-1:0]  ctx_q;
  logic [2:0]        i_q;

  // decision stage
  logic              d_valid, d_bit, d_last;
  logic [ADDR_W-1:0] d_addr;
  logic [STATE_W:0]  d_data;

  logic              adv, issue, fire, take;
  logic [SYM_W-1:0]  node;
  logic [STATE_W:0]  upd;

  assign busy     = clr_q;
  assign adv      = !d_valid || out_ready;
  assign issue    = adv && have_q;
  assign fire     = out_valid && out_ready;
  assign in_ready = !clr_q && (!have_q || (issue && i_q == 3'd7));
  assign take     = in_valid && in_ready;

  // heap index of the current decision
  always_comb begin
    node = SYM_W'(1) << i_q;
    node = node | SYM_W'(sym_q >> (SYM_W - 32'(i_q)));
  end

  assign out_valid       = d_valid;
  assign out_dec.bit_val = d_bit;
  assign out_dec.mps     = d_data[STATE_W];
  assign out_dec.state   = d_data[STATE_W-1:0];
  assign out_dec.last    = d_last;
  assign upd             = next_state(d_data[STATE_W-1:0], d_data[STATE_W], d_bit);

  // probability memory: one read and one write port
  always_ff @(posedge clk) begin
    if (clr_q) begin
      mem[clr_addr] <= '0;
    end else if (fire) begin
      mem[d_addr] <= upd;
    end
    if (issue) d_data <= mem[{ctx_q, node}];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clr_q    <= 1'b1;
      clr_addr <= '0;
      have_q   <= 1'b0;
      last_q   <= 1'b0;
      sym_q    <= '0;
      ctx_q    <= '0;
      i_q      <= '0;
      d_valid  <= 1'b0;
      d_bit    <= 1'b0;
      d_last   <= 1'b0;
      d_addr   <= '0;
    end else begin
      if (clr_q) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == '1) clr_q <= 1'b0;
      end else if (clear && !have_q && !d_valid) begin
        clr_q    <= 1'b1;
        clr_addr <= '0;
      end
      if (adv) d_valid <= issue;
      if (issue) begin
        d_addr <= {ctx_q, node};
        d_bit  <= sym_q[3'd7 - i_q];
        d_last <= last_q && (i_q == 3'd7);
        i_q    <= i_q + 1'b1;
        if (i_q == 3'd7) have_q <= 1'b0;
      end
      if (take) begin
        have_q <= 1'b1;
        sym_q  <= in_sym;
        ctx_q  <= in_ctx;
        last_q <= in_last;
        i_q    <= '0;
      end
    end
  end

  // consecutive decisions never touch the same node
  assert property (@(posedge clk) disable iff (!rst_n)
                   (issue && fire) |-> ({ctx_q, node} != d_addr))
    else $error("read/write collision in the probability memory");

endmodule
