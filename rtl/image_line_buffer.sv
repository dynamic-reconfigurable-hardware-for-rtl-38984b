// Three-line pixel store of the image modeller.
//
// Holds the current image line and the two above it in three line
// memories addressed through three rotating pointers: at the end of each
// line the pointers rotate, so the oldest line becomes the new current
// line and no pixel is ever copied. For the pixel at column x it supplies
// the seven causal neighbours
//   NN, NNE (two lines up, columns x, x+1)
//   NW, N, NE (one line up, columns x-1, x, x+1)
//   WW, W (current line, columns x-2, x-1)
// NW, W and WW come from registers, the others from the line memories.
// Neighbours outside the image (first two lines, first two columns, last
// column) read as 0. `adv` stores the current pixel and moves to the next
// column; `restart` returns to the top-left corner for a new image.
// Neighbours are combinational from the registered position and change in
// the cycle after adv.
//
// The three lines with three rotating pointers follow the description of
// the image modeller; the zero border and the register/memory split are
// this design's own.
module image_line_buffer
  import lossless_pkg::*;
#(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned COL_W = $clog2(WIDTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic             adv,
  input  logic [SYM_W-1:0] pix,
  output nbr_t             nbr
);

  logic [SYM_W-1:0] line [3][WIDTH];
  logic [1:0]       p_cur, p_up1, p_up2;   // rotating line pointers
  logic [1:0]       rows_q;                // lines above that exist (0..2)
  logic [SYM_W-1:0] w_q, ww_q, nw_q;
  logic             has_next;
  logic [COL_W-1:0] col, col_n;

  assign has_next  = (col != COL_W'(WIDTH - 1));
  assign col_n     = has_next ? col + 1'b1 : col;

  always_comb begin
    nbr.w   = w_q;
    nbr.ww  = ww_q;
    nbr.nw  = nw_q;
    nbr.n   = (rows_q >= 2'd1) ? line[p_up1][col] : '0;
    nbr.ne  = (rows_q >= 2'd1 && has_next) ? line[p_up1][col_n] : '0;
    nbr.nn  = (rows_q >= 2'd2) ? line[p_up2][col] : '0;
    nbr.nne = (rows_q >= 2'd2 && has_next) ? line[p_up2][col_n] : '0;
  end

  always_ff @(posedge clk) begin
    if (adv) line[p_cur][col] <= pix;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      p_cur  <= 2'd0;
      p_up1  <= 2'd1;
      p_up2  <= 2'd2;
      rows_q <= '0;
      col    <= '0;
      w_q    <= '0;
      ww_q   <= '0;
      nw_q   <= '0;
    end else if (adv) begin
      if (has_next) begin
        col  <= col + 1'b1;
        w_q  <= pix;
        ww_q <= w_q;
        nw_q <= nbr.n;
      end else begin
        // end of line: the oldest line becomes the current one
        col    <= '0;
        p_cur  <= p_up2;
        p_up1  <= p_cur;
        p_up2  <= p_up1;
        if (rows_q != 2'd2) rows_q <= rows_q + 1'b1;
        w_q    <= '0;
        ww_q   <= '0;
        nw_q   <= '0;
      end
    end
  end

endmodule
