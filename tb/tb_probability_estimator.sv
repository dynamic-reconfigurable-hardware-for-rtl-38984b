// Self-checking testbench of the probability estimator.
//
// Random symbols in a few contexts are fed with random input gaps and
// random output stalls. A reference model kept here (its own node array and
// its own copy of the state rule: MPS +1 up to 63, LPS halves, LPS at 0
// swaps the MPS) predicts every decision's bit, MPS, state and last flag.
// A burst without stalls checks the rate of one decision per clock. A
// clear pulse at the end must bring the nodes back to state 0.
module tb_probability_estimator;
  import lossless_pkg::*;

  localparam int CTX_W = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear, busy, in_valid, in_ready, in_last, out_valid, out_ready;
  logic [7:0] in_sym;
  logic [CTX_W-1:0] in_ctx;
  decision_t out_dec;

  probability_estimator #(.CTX_W(CTX_W)) dut (.*);

  int checks = 0, failures = 0;
  bit [6:0] ref_node [int];
  typedef struct { logic [7:0] s; int c; logic l; } sym_t;
  sym_t q[$];
  int bitpos = 0;
  bit stall = 1'b1;
  int n_dec = 0;

  function automatic bit [6:0] ref_get(int a);
    return ref_node.exists(a) ? ref_node[a] : 7'd0;
  endfunction

  // check every decision as it leaves
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int node, a;
      bit [6:0] st;
      bit b, m;
      int s;
      node = (1 << bitpos) | (q[0].s >> (8 - bitpos));
      a = q[0].c * 256 + node;
      st = ref_get(a);
      b = q[0].s[7 - bitpos];
      checks++;
      if (out_dec.bit_val != b || out_dec.mps != st[6] || out_dec.state != st[5:0] ||
          out_dec.last != (q[0].l && bitpos == 7)) begin
        failures++;
        if (failures < 10) $display("decision mismatch: sym %h bit %0d got b%0d m%0d s%0d exp b%0d m%0d s%0d",
          q[0].s, bitpos, out_dec.bit_val, out_dec.mps, out_dec.state, b, st[6], st[5:0]);
      end
      m = st[6]; s = st[5:0];
      if (b == m) s = (s == 63) ? 63 : s + 1;
      else if (s == 0) m = ~m;
      else s = s / 2;
      ref_node[a] = {m, 6'(s)};
      n_dec++;
      bitpos++;
      if (bitpos == 8) begin bitpos = 0; void'(q.pop_front()); end
    end
  end
  always @(posedge clk) out_ready <= stall ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic send(int n, bit gaps);
    for (int i = 0; i < n; i++) begin
      sym_t e;
      e.s = ($urandom_range(0, 3) == 0) ? 8'($urandom) : 8'($urandom_range(60, 68));
      e.c = $urandom_range(0, 3);
      e.l = (i == n - 1);
      @(negedge clk);
      while (gaps && $urandom_range(0, 2) == 0) @(negedge clk);
      in_valid = 1'b1; in_sym = e.s; in_ctx = CTX_W'(e.c); in_last = e.l;
      while (!in_ready) @(negedge clk);
      q.push_back(e);
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  initial begin
    int c0, d0;
    clear = 0; in_valid = 0; in_sym = 0; in_ctx = 0; in_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (!busy);
    send(600, 1'b1);
    while (q.size() > 0) @(posedge clk);
    // rate: back-to-back symbols, no stalls
    stall = 1'b0;
    @(negedge clk);
    c0 = 0; d0 = n_dec;
    fork
      begin
        for (int i = 0; i < 100; i++) begin
          sym_t e;
          e.s = 8'($urandom); e.c = 1; e.l = 0;
          in_valid = 1'b1; in_sym = e.s; in_ctx = 1; in_last = 0;
          while (!in_ready) @(negedge clk);
          q.push_back(e);
          @(negedge clk);
        end
        in_valid = 1'b0;
      end
      begin
        while (n_dec - d0 < 800) begin @(posedge clk); c0++; end
      end
    join
    checks++;
    if (c0 > 805) begin failures++; $display("rate: 800 decisions took %0d cycles", c0); end
    // clear returns every node to the initial state
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    checks++;
    if (!busy) begin failures++; $display("clear did not start"); end
    wait (!busy);
    ref_node.delete();
    stall = 1'b1;
    send(50, 1'b0);
    while (q.size() > 0) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
