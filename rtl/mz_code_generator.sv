// Code generator of the arithmetic coder: resolves carries.
//
// The interval stage hands over, per coded decision, the bits that the
// renormalising shift pushed out of the low register (up to 8, first bit
// in bits[7]) and the carry that an LPS addition produced above them. A
// carry can still change bits that were already shifted out, so they are
// held back here as one pending bit x followed by a run of k ones (the
// only pattern a carry can ripple through). For every shifted-out bit t:
//   t = 0 or carry : the pending bits are final; emit x+carry followed by
//                    k copies of ~carry, then x <= t, k <= 0
//   t = 1, no carry: k <= k + 1
// The first pending bit of a block stands for the integer part of the code
// value, which is always 0, and is not emitted. An entry with `fin` set
// (end of block) releases the pending bits without a new one.
//
// The result is one record per entry: an optional head bit, a run of
// run_len equal bits (which may be long) and up to 8 literal tail bits
// (MSB-first, right aligned). One entry per cycle, valid/ready on both
// sides, one register stage. The carry-run scheme is this design's own;
// the block's name and its place after the code buffer follow the coder's
// diagram.
module mz_code_generator
  import lossless_pkg::*;
#(
  parameter int unsigned RUN_W = 20   // width of the pending-ones counter
) (
  input  logic             clk,
  input  logic             rst_n,
  // code buffer entry
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [3:0]       in_sh,     // number of bits shifted out (0..8)
  input  logic [7:0]       in_bits,   // shifted-out bits, first in bit 7
  input  logic             in_carry,  // carry into the pending bits
  input  logic             in_fin,    // end of block: release pending bits
  // record to the code packer
  output logic             out_valid,
  input  logic             out_ready,
  output logic             out_head_v,
  output logic             out_head,
  output logic [RUN_W-1:0] out_run_len,
  output logic             out_run_bit,
  output logic [7:0]       out_tail,
  output logic [3:0]       out_tail_len,
  output logic             out_eob
);

  logic             x_q, primed_q;
  logic [RUN_W-1:0] k_q;

  logic             x_d, primed_d;
  logic [RUN_W-1:0] k_d;
  logic             head_v, head_b, run_b, first_done, c;
  logic [RUN_W-1:0] run_l;
  logic [7:0]       tail;
  logic [3:0]       tail_l;
  logic             t, is_bit, is_fin;

  assign in_ready = !out_valid || out_ready;

  always_comb begin
    x_d        = x_q;
    k_d        = k_q;
    primed_d   = primed_q;
    head_v     = 1'b0;
    head_b     = 1'b0;
    run_b      = 1'b1;
    run_l      = '0;
    tail       = '0;
    tail_l     = '0;
    first_done = 1'b0;
    c          = in_carry;
    for (int j = 0; j < 9; j++) begin
      is_bit = (j < 8) && (4'(j) < in_sh);
      is_fin = (4'(j) == in_sh) && in_fin;
      t      = (j < 8) ? in_bits[7 - (j % 8)] : 1'b0;
      if (is_bit && t && !c) begin
        k_d = k_d + 1'b1;
      end else if (is_bit || is_fin) begin
        // the pending bits become final
        if (!first_done) begin
          head_v     = primed_d;
          head_b     = x_d | c;
          run_l      = k_d;
          run_b      = ~c;
          first_done = 1'b1;
        end else begin
          // a later group inside one entry holds at most 7 ones
          tail   = (tail << (4'(k_d[2:0]) + 4'd1)) | (8'(x_d) << k_d[2:0])
                 | ((8'd1 << k_d[2:0]) - 8'd1);
          tail_l = tail_l + 4'(k_d[2:0]) + 4'd1;
        end
        x_d      = t;
        k_d      = '0;
        c        = 1'b0;
        primed_d = 1'b1;
      end
    end
    if (in_fin) begin
      x_d      = 1'b0;
      k_d      = '0;
      primed_d = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q          <= 1'b0;
      k_q          <= '0;
      primed_q     <= 1'b0;
      out_valid    <= 1'b0;
      out_head_v   <= 1'b0;
      out_head     <= 1'b0;
      out_run_len  <= '0;
      out_run_bit  <= 1'b0;
      out_tail     <= '0;
      out_tail_len <= '0;
      out_eob      <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        x_q          <= x_d;
        k_q          <= k_d;
        primed_q     <= primed_d;
        out_head_v   <= head_v;
        out_head     <= head_b;
        out_run_len  <= run_l;
        out_run_bit  <= run_b;
        out_tail     <= tail;
        out_tail_len <= tail_l;
        out_eob      <= in_fin;
      end
    end
  end

  // A carry always lands on a pending 0 and the run counter never wraps.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && in_ready && in_carry) |-> !x_q)
    else $error("carry into a pending 1");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && in_ready) |-> (k_q < {RUN_W{1'b1}} - 8))
    else $error("pending run counter overflow");

endmodule
