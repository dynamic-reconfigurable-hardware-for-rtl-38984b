// Self-checking testbench of the general-data context modeller.
//
// A model written here with associative arrays keeps its own copy of the
// hashed tree (index = ({byte,00} ^ parent) + probe, up to 4 probes,
// areas handed out from 1, a new node ends the walk) and predicts, for
// every byte, the list of matched areas, the chosen context and the block
// end flag. Blocks of repetitive text-like data exercise deep matches;
// a long block of random bytes exercises collisions and running out of
// the 1023 context areas; the block boundary checks that the whole tree is
// forgotten in one step. The cycle count of a repetitive block is checked
// against the schedule of one cycle to take a byte, two per tree read
// and one to commit (8 per byte when no collision occurs).
module tb_data_context_modeler;
  import lossless_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [7:0] in_sym, out_sym;
  logic [9:0] out_ctx;
  logic [1:0] out_count;
  logic [9:0] out_areas [3];

  data_context_modeler dut (.*);

  int checks = 0, failures = 0;
  int n_match = 0, n_new = 0, n_coll = 0, n_full = 0;
  int exp_cycles = 0;

  // reference tree
  int m_area [int], m_prefix [int], m_sym [int];
  int m_next;
  int m_hist [$];
  typedef struct { int sym; int cnt; int areas[3]; int ctx; bit last; } exp_t;
  exp_t expq [$];
  bit stall = 1'b1;

  function automatic void model_reset();
    m_area.delete(); m_prefix.delete(); m_sym.delete();
    m_next = 1;
    m_hist.delete();
  endfunction

  function automatic void model_symbol(int x, bit last);
    exp_t e;
    int parent;
    bit stop;
    e.sym = x; e.cnt = 0; e.ctx = 0; e.last = last;
    exp_cycles += 2;       // take the byte, commit
    parent = 0; stop = 0;
    foreach (m_hist[lvl]) begin
      bit matched;
      if (stop) break;
      matched = 0;
      for (int p = 0; p < 4; p++) begin
        int idx;
        idx = (((m_hist[lvl] * 4) ^ parent) & 1023) + p;
        exp_cycles += 2;   // one read, one compare
        if (m_area.exists(idx)) begin
          if (m_prefix[idx] == parent && m_sym[idx] == m_hist[lvl]) begin
            e.areas[e.cnt] = m_area[idx];
            e.cnt++;
            parent = m_area[idx];
            matched = 1;
            n_match++;
            break;
          end
          n_coll++;
        end else begin
          if (m_next <= 1023) begin
            m_area[idx] = m_next; m_prefix[idx] = parent; m_sym[idx] = m_hist[lvl];
            m_next++;
            n_new++;
          end else n_full++;
          break;
        end
      end
      if (!matched) stop = 1;
    end
    if (e.cnt > 0) e.ctx = e.areas[e.cnt - 1];
    expq.push_back(e);
    m_hist.push_front(x);
    if (m_hist.size() > 3) void'(m_hist.pop_back());
    if (last) model_reset();
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      exp_t e;
      bit bad;
      e = expq.pop_front();
      bad = (out_sym != 8'(e.sym)) || (out_count != 2'(e.cnt)) || (out_ctx != 10'(e.ctx)) ||
            (out_last != e.last);
      for (int i = 0; i < e.cnt; i++) if (out_areas[i] != 10'(e.areas[i])) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("mismatch: sym %0d cnt %0d/%0d ctx %0d/%0d", e.sym, out_count, e.cnt, out_ctx, e.ctx);
      end
    end
  end
  always @(posedge clk) out_ready <= stall ? ($urandom_range(0, 2) != 0) : 1'b1;

  string txt = "the quick brown fox jumps over the lazy dog; the lazy dog sleeps. ";

  task automatic send_block(int n, bit random_data);
    for (int i = 0; i < n; i++) begin
      int x;
      x = random_data ? int'($urandom_range(0, 255)) : int'(txt[i % txt.len()]);
      @(negedge clk);
      in_valid = 1'b1; in_sym = 8'(x); in_last = (i == n - 1);
      while (!in_ready) @(negedge clk);
      model_symbol(x, in_last);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    int c0;
    in_valid = 0; in_sym = 0; in_last = 0;
    model_reset();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send_block(400, 1'b0);
    send_block(3000, 1'b1);
    send_block(300, 1'b0);
    while (expq.size() > 0) @(posedge clk);
    // rate check on a repetitive block without output stalls
    stall = 1'b0;
    c0 = 0;
    exp_cycles = 0;
    fork
      send_block(500, 1'b0);
      begin @(negedge clk); while (expq.size() > 0 || in_valid) begin @(posedge clk); c0++; end end
    join
    checks++;
    if (c0 > exp_cycles + 4) begin failures++; $display("rate: 500 bytes took %0d cycles, expected %0d", c0, exp_cycles); end
    $display("matches %0d new nodes %0d collisions %0d areas exhausted %0d", n_match, n_new, n_coll, n_full);
    checks++;
    if (n_match == 0 || n_new == 0 || n_coll == 0 || n_full == 0) begin
      failures++; $display("a modeller case was never exercised");
    end
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
