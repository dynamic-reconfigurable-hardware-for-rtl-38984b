// Multiplication-free binary arithmetic coder (one decision per clock).
//
// The coder keeps an 8-bit interval size A, normalised to 0x80..0xFF, and
// a low register L with one carry bit above it. A 64x6 LPS table gives the
// LPS sub-interval q for the decision's 6-bit probability state. The MPS
// takes the lower part of the interval and the LPS the upper part:
//   MPS: A <- A - q                LPS: L <- L + (A - q), A <- q
// Then A is shifted left by its number of leading zeros (0..7) in the same
// cycle, and L with it, so there is no renormalisation loop and one
// decision is coded per clock. Because q <= 63 < 0x80 <= A, both parts are
// always non-empty. The bits shifted out of L and the carry go through a
// code buffer register to the code generator (carry resolution) and the
// code packer (bytes). At the last decision of a block the 8 bits of L are
// flushed, the pending bits released and the final byte zero-padded, so
// every block is an independent byte stream.
//
// Pipeline (6 register stages): decision/LPS-table read, interval update
// into the code buffer, code generator, code packer accumulator, output
// byte register. Input and output use valid/ready; a stall anywhere holds
// the stages before it.
//
// From the coder's block diagram: the 64x6 LPS table, the 6-bit state, the
// MPS/bit comparison, the add/subtract of the LPS value, shifting A and the
// low register by a shift count in one step, and the code buffer, code
// generator and code packer chain. The exact Z-coder interval arithmetic is
// not given; the Q-coder-like split above, the table formula (see
// lossless_pkg::lps_value) and the carry handling are this design's own.
module mz_arith_coder
  import lossless_pkg::*;
#(
  parameter int unsigned RUN_W = 20
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  decision_t in_dec,
  output logic      out_valid,
  input  logic      out_ready,
  output logic [7:0] out_byte,
  output logic      out_last
);

  // ---------------- LPS table (64 x 6) ----------------
  logic [LPS_W-1:0] lps_rom [64];
  for (genvar g = 0; g < 64; g++) begin : g_rom
    localparam logic [LPS_W-1:0] QV = lps_value(g);
    assign lps_rom[g] = QV;
  end

  // ---------------- stage 1: decision + LPS value ----------------
  logic             s1_valid, s1_is_mps, s1_last;
  logic [LPS_W-1:0] s1_q;
  logic             s1_ready;

  // ---------------- stage 2: interval registers ----------------
  logic [RANGE_W-1:0] a_q;
  logic [RANGE_W:0]   l_q;        // bit 8 is the carry
  logic [1:0]         flush_q;    // 0 run, 1 flush L, 2 release pending

  // code buffer register
  logic       cb_valid, cb_carry, cb_fin, cb_ready;
  logic [3:0] cb_sh;
  logic [7:0] cb_bits;

  logic [RANGE_W-1:0] a_new, a_sub;
  logic [RANGE_W:0]   l_new;
  logic [3:0]         sh;
  logic               cb_load;

  assign in_ready = (!s1_valid || s1_ready) && (flush_q == 2'd0);
  // stage 2 can take stage 1 when the code buffer is free and no flush runs
  assign s1_ready = cb_ready && (flush_q == 2'd0);
  assign cb_load  = cb_ready && (s1_valid || flush_q != 2'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_is_mps <= 1'b0;
      s1_last   <= 1'b0;
      s1_q      <= '0;
    end else if (in_ready) begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_is_mps <= (in_dec.bit_val == in_dec.mps);
        s1_last   <= in_dec.last;
        s1_q      <= lps_rom[in_dec.state];
      end
    end else if (s1_ready) begin
      s1_valid <= 1'b0;
    end
  end

  // interval update and one-step renormalisation
  always_comb begin
    a_sub = a_q - RANGE_W'(s1_q);
    if (s1_is_mps) begin
      a_new = a_sub;
      l_new = l_q;
    end else begin
      a_new = RANGE_W'(s1_q);
      l_new = l_q + (RANGE_W+1)'(a_sub);
    end
    // find the highest set bit: leading zero count
    sh = 4'd0;
    for (int i = 0; i < RANGE_W; i++) begin
      if (a_new[i]) sh = 4'(RANGE_W - 1 - i);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q      <= '1;
      l_q      <= '0;
      flush_q  <= 2'd0;
      cb_valid <= 1'b0;
      cb_sh    <= '0;
      cb_bits  <= '0;
      cb_carry <= 1'b0;
      cb_fin   <= 1'b0;
    end else if (cb_ready) begin
      cb_valid <= cb_load;
      if (flush_q == 2'd1) begin
        // emit all of L; the decoder reads zeros after the end
        cb_sh    <= 4'd8;
        cb_bits  <= l_q[7:0];
        cb_carry <= l_q[8];
        cb_fin   <= 1'b0;
        flush_q  <= 2'd2;
      end else if (flush_q == 2'd2) begin
        cb_sh    <= 4'd0;
        cb_bits  <= '0;
        cb_carry <= 1'b0;
        cb_fin   <= 1'b1;
        flush_q  <= 2'd0;
        a_q      <= '1;
        l_q      <= '0;
      end else if (s1_valid) begin
        a_q      <= a_new << sh;
        cb_sh    <= sh;
        cb_bits  <= l_new[7:0] & ~(8'hFF >> sh);
        cb_carry <= (sh != 4'd0) && l_new[8];
        cb_fin   <= 1'b0;
        if (sh == 4'd0) l_q <= l_new;
        else            l_q <= {1'b0, l_new[7:0] << sh};
        if (s1_last) flush_q <= 2'd1;
      end
    end
  end

  // ---------------- code generator and packer ----------------
  logic             g_valid, g_ready, g_head_v, g_head, g_run_bit, g_eob;
  logic [RUN_W-1:0] g_run_len;
  logic [7:0]       g_tail;
  logic [3:0]       g_tail_len;

  mz_code_generator #(.RUN_W(RUN_W)) u_gen (
    .clk, .rst_n,
    .in_valid (cb_valid), .in_ready (cb_ready),
    .in_sh (cb_sh), .in_bits (cb_bits), .in_carry (cb_carry), .in_fin (cb_fin),
    .out_valid (g_valid), .out_ready (g_ready),
    .out_head_v (g_head_v), .out_head (g_head),
    .out_run_len (g_run_len), .out_run_bit (g_run_bit),
    .out_tail (g_tail), .out_tail_len (g_tail_len), .out_eob (g_eob)
  );

  mz_code_packer #(.RUN_W(RUN_W)) u_pack (
    .clk, .rst_n,
    .in_valid (g_valid), .in_ready (g_ready),
    .in_head_v (g_head_v), .in_head (g_head),
    .in_run_len (g_run_len), .in_run_bit (g_run_bit),
    .in_tail (g_tail), .in_tail_len (g_tail_len), .in_eob (g_eob),
    .out_valid, .out_ready, .out_byte, .out_last
  );

  // The interval never empties and the carry never reaches past bit 8.
  assert property (@(posedge clk) disable iff (!rst_n) a_q[RANGE_W-1])
    else $error("interval register not normalised");

endmodule
