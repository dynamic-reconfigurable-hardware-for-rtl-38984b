// Double buffer of found context areas between the data modeller and the
// probability estimator.
//
// Two equal banks, each holding up to DEPTH context areas (one per model
// order found for a symbol) together with the symbol and an end-of-block
// flag. The modeller pushes areas into the fill bank and closes it with
// `commit`; the estimator side sees the other, closed bank (out_valid,
// out_count, out_areas, out_sym, out_last) and frees it with out_ready.
// When the modeller has committed one bank and the other has been drained,
// the roles of the two banks swap, so modelling of the next symbol overlaps
// with the estimation of the previous one. fill_ready tells the modeller
// that the fill bank is free. Commit to out_valid: one cycle.
//
// The two equal buffers, their depth of 3 areas of 10 bits and the swap
// rule come from the description of the modeller and its diagram; carrying
// the symbol and block end along is this design's own.
module context_area_buffer
  import lossless_pkg::*;
#(
  parameter int unsigned DEPTH = 3,
  parameter int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // modeller side
  output logic              fill_ready,
  input  logic              push,
  input  logic [AREA_W-1:0] push_area,
  input  logic              commit,
  input  logic [SYM_W-1:0]  commit_sym,
  input  logic              commit_last,
  // estimator side
  output logic              out_valid,
  input  logic              out_ready,
  output logic [CNT_W-1:0]  out_count,
  output logic [AREA_W-1:0] out_areas [DEPTH],
  output logic [SYM_W-1:0]  out_sym,
  output logic              out_last
);

  logic [AREA_W-1:0] areas [2][DEPTH];
  logic [CNT_W-1:0]  cnt   [2];
  logic [SYM_W-1:0]  sym   [2];
  logic [1:0]        full, lastf;
  logic              fill_sel, drain_sel;

  assign fill_ready = !full[fill_sel];
  assign out_valid  = full[drain_sel];
  assign out_count  = cnt[drain_sel];
  assign out_sym    = sym[drain_sel];
  assign out_last   = lastf[drain_sel];
  always_comb begin
    for (int i = 0; i < DEPTH; i++) out_areas[i] = areas[drain_sel][i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full      <= '0;
      lastf     <= '0;
      fill_sel  <= 1'b0;
      drain_sel <= 1'b0;
      for (int b = 0; b < 2; b++) begin
        cnt[b] <= '0;
        sym[b] <= '0;
        for (int i = 0; i < DEPTH; i++) areas[b][i] <= '0;
      end
    end else begin
      if (push && fill_ready && cnt[fill_sel] < CNT_W'(DEPTH)) begin
        areas[fill_sel][cnt[fill_sel][$clog2(DEPTH)-1:0]] <= push_area;
        cnt[fill_sel] <= cnt[fill_sel] + 1'b1;
      end
      if (commit && fill_ready) begin
        full[fill_sel]  <= 1'b1;
        sym[fill_sel]   <= commit_sym;
        lastf[fill_sel] <= commit_last;
        fill_sel        <= ~fill_sel;
      end
      if (out_valid && out_ready) begin
        full[drain_sel] <= 1'b0;
        cnt[drain_sel]  <= '0;
        drain_sel       <= ~drain_sel;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && commit))
    else $error("push and commit in the same cycle");

endmodule
