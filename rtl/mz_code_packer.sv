// Code packer of the arithmetic coder: turns generator records into bytes.
//
// A record is an optional head bit, a run of equal bits and up to 8 tail
// bits. The packer appends them MSB-first to a 32-bit accumulator, at most
// the head, 7 run bits and the tail in one cycle; a record is worked on in
// the cycle it is taken, and only a run longer than 7 bits (or a full
// accumulator) keeps in_ready low for further cycles. Whenever 8 or
// more bits are in the accumulator the oldest byte moves to the output
// register. An end-of-block record pads the last byte with zeros and marks
// it with out_last; no new record is taken until that byte has left.
// Latency: a record's bits reach out_byte one or two cycles after it is taken.
// The 20-bit codeword and byte output of the coder diagram are followed in
// spirit; the accumulator size and the append rule are this design's own.
module mz_code_packer #(
  parameter int unsigned RUN_W = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             in_head_v,
  input  logic             in_head,
  input  logic [RUN_W-1:0] in_run_len,
  input  logic             in_run_bit,
  input  logic [7:0]       in_tail,
  input  logic [3:0]       in_tail_len,
  input  logic             in_eob,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [7:0]       out_byte,
  output logic             out_last
);

  // current record
  logic             busy_q, head_pend_q, head_q, run_bit_q, eob_q;
  logic [RUN_W-1:0] run_rem_q;
  logic [7:0]       tail_q;
  logic [3:0]       tail_len_q;
  // accumulator, oldest bit in acc_q[31]
  logic [31:0]      acc_q;
  logic [5:0]       acc_len_q;
  logic             last_pend_q;   // padded final byte still in the accumulator

  logic             pop, take;
  logic [31:0]      acc_p;
  logic [5:0]       len_p;
  logic             busy_d, head_pend_d, run_bit_d, eob_d, last_pend_d;
  logic [RUN_W-1:0] run_rem_d;
  logic [7:0]       tail_d;
  logic [3:0]       tail_len_d;
  logic [31:0]      acc_d;
  logic [5:0]       len_d;
  logic [4:0]       app_len;
  logic [15:0]      app_bits;
  logic [RUN_W-1:0] chunk;

  // the record worked on this cycle: the held remainder, else the new one
  logic             c_head_pend, c_head, c_run_bit, c_eob, c_act;
  logic [RUN_W-1:0] c_run;
  logic [7:0]       c_tail;
  logic [3:0]       c_tail_len;

  assign pop      = (acc_len_q >= 6'd8) && (!out_valid || out_ready);
  assign len_p    = pop ? (acc_len_q - 6'd8) : acc_len_q;
  assign in_ready = !busy_q && !last_pend_q && (len_p <= 6'd16);
  assign take     = in_valid && in_ready;

  always_comb begin
    c_act       = busy_q ? (len_p <= 6'd16) : take;
    c_head_pend = busy_q ? head_pend_q : in_head_v;
    c_head      = busy_q ? head_q      : in_head;
    c_run_bit   = busy_q ? run_bit_q   : in_run_bit;
    c_run       = busy_q ? run_rem_q   : in_run_len;
    c_tail      = busy_q ? tail_q      : in_tail;
    c_tail_len  = busy_q ? tail_len_q  : in_tail_len;
    c_eob       = busy_q ? eob_q       : in_eob;

    // remove the byte that leaves this cycle
    acc_p = pop ? (acc_q << 8) : acc_q;

    busy_d      = busy_q;
    head_pend_d = head_pend_q;
    run_bit_d   = c_run_bit;
    run_rem_d   = run_rem_q;
    tail_d      = c_tail;
    tail_len_d  = c_tail_len;
    eob_d       = c_eob;
    last_pend_d = last_pend_q;

    acc_d    = acc_p;
    len_d    = len_p;
    app_len  = '0;
    app_bits = '0;
    chunk    = '0;
    if (c_act) begin
      if (c_head_pend) begin
        app_bits = {app_bits[14:0], c_head};
        app_len  = app_len + 1'b1;
      end
      chunk = (c_run > RUN_W'(7)) ? RUN_W'(7) : c_run;
      for (int m = 0; m < 7; m++) begin
        if (RUN_W'(m) < chunk) begin
          app_bits = {app_bits[14:0], c_run_bit};
          app_len  = app_len + 1'b1;
        end
      end
      head_pend_d = 1'b0;
      run_rem_d   = c_run - chunk;
      busy_d      = 1'b1;
      if (c_run == chunk) begin
        for (int m = 0; m < 8; m++) begin
          if (4'(m) < c_tail_len) begin
            app_bits = {app_bits[14:0], c_tail[3'(c_tail_len - 4'(m) - 4'd1)]};
            app_len  = app_len + 1'b1;
          end
        end
        busy_d = 1'b0;
      end
      acc_d = acc_p | (({app_bits, 16'h0} << (16 - app_len)) >> len_p);
      len_d = len_p + 6'(app_len);
      if (c_run == chunk && c_eob) begin
        // pad to a whole byte and mark the final byte
        len_d       = (len_d + 6'd7) & 6'h38;
        last_pend_d = 1'b1;
      end
    end
    if (pop && last_pend_q && acc_len_q == 6'd8) last_pend_d = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q      <= 1'b0;
      head_pend_q <= 1'b0;
      head_q      <= 1'b0;
      run_bit_q   <= 1'b0;
      run_rem_q   <= '0;
      tail_q      <= '0;
      tail_len_q  <= '0;
      eob_q       <= 1'b0;
      last_pend_q <= 1'b0;
      acc_q       <= '0;
      acc_len_q   <= '0;
      out_valid   <= 1'b0;
      out_byte    <= '0;
      out_last    <= 1'b0;
    end else begin
      busy_q      <= busy_d;
      head_pend_q <= head_pend_d;
      if (take) head_q <= in_head;
      run_bit_q   <= run_bit_d;
      run_rem_q   <= run_rem_d;
      tail_q      <= tail_d;
      tail_len_q  <= tail_len_d;
      eob_q       <= eob_d;
      last_pend_q <= last_pend_d;
      acc_q       <= acc_d;
      acc_len_q   <= len_d;
      if (pop) begin
        out_valid <= 1'b1;
        out_byte  <= acc_q[31:24];
        out_last  <= last_pend_q && (acc_len_q == 6'd8);
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
