// End-to-end testbench of the compression core at its default sizes.
//
// Data blocks (text-like and random), one 512 x 8 image, a stretch of
// video through a simple external modelling stage kept here (context =
// previous pixel / 4), and another data block are compressed in turn, with
// mode changes between them, random input pauses and random output
// stalls. Every block's bytes are decoded by the reference decoder of
// codec_ref_pkg, using the contexts that the reference models of the data
// and image modellers give, and every symbol must come back. Each
// mechanism of the design is counted and must occur at least once:
// mode changes (and input held off for them), matches, new nodes,
// collisions and exhausted areas in the context tree, block resets, the
// double buffer working on two symbols at once, the error feedback
// overflow guard, carries and long pending runs in the coder, and
// back-pressure from the output.
module tb_lossless_compressor_top;
  import lossless_pkg::*;
  import codec_ref_pkg::*;
  import image_ref_pkg::*;

  localparam int W = 512;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mode_e req_mode, active_mode;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [7:0] in_sym, out_byte;
  logic vid_in_valid, vid_in_ready, vid_in_last, vid_mod_valid, vid_mod_ready;
  logic [7:0] vid_in_sym;
  ctx_sym_t vid_mod;

  lossless_compressor_top dut (.*);

  int checks = 0, failures = 0;

  // expected blocks
  typedef struct { mode_e mode; int sym [$]; int ctx [$]; } blk_t;
  blk_t exp_q [$];
  blk_t cur_blk;
  byte unsigned got [$];
  decoder dec;
  data_model dm;
  image_model im;
  mode_e last_dec_mode = MODE_VIDEO;
  bit first_dec = 1;
  int n_blocks_done = 0;
  bit stall = 1;

  // mechanism counters
  int n_switch = 0, n_hold = 0, n_carry = 0, n_longrun = 0, n_outstall = 0;
  int n_overlap = 0, n_blkrst = 0, n_coder_stall = 0;
  int total_in = 0, total_out = 0;

  // ---------------- external video modelling stage ----------------
  ctx_sym_t vq [$];
  int v_prev = 0;
  assign vid_in_ready = 1'b1;
  always @(posedge clk) begin
    if (vid_mod_valid && vid_mod_ready) void'(vq.pop_front());
    if (vid_in_valid && vid_in_ready) begin
      ctx_sym_t e;
      e.sym = vid_in_sym; e.ctx = 10'(v_prev / 4); e.last = vid_in_last;
      v_prev = vid_in_last ? 0 : int'(vid_in_sym);
      vq.push_back(e);
    end
    vid_mod_valid <= (vq.size() > 0);
    vid_mod       <= (vq.size() > 0) ? vq[0] : '0;
  end

  // ---------------- output side ----------------
  always @(posedge clk) out_ready <= stall ? ($urandom_range(0, 4) != 0) : 1'b1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_cfg.switch_pulse) n_switch++;
      if (in_valid && !dut.u_cfg.accept) n_hold++;
      if (dut.u_coder.cb_valid && dut.u_coder.cb_ready && dut.u_coder.cb_carry) n_carry++;
      if (dut.u_coder.u_pack.busy_q) n_longrun++;
      if (out_valid && !out_ready) n_outstall++;
      if (dut.u_data.u_buf.out_valid && dut.u_data.u_buf.fill_ready) n_overlap++;
      if (dut.u_est.out_valid && !dut.u_est.out_ready) n_coder_stall++;
      if (dut.u_data.blk_rst) n_blkrst++;
    end
    if (rst_n && out_valid && out_ready) begin
      got.push_back(out_byte);
      total_out++;
      if (out_last) check_block();
    end
  end

  function automatic void check_block();
    blk_t b;
    int bad;
    if (exp_q.size() == 0) begin
      failures++;
      $display("bytes of an unexpected block");
      return;
    end
    b = exp_q.pop_front();
    if (first_dec || b.mode != last_dec_mode) dec.clear_stats();
    first_dec = 0;
    last_dec_mode = b.mode;
    dec.start_block(got);
    bad = 0;
    foreach (b.sym[i]) begin
      int s;
      s = dec.decode_symbol(b.ctx[i]);
      checks++;
      if (s != b.sym[i]) begin
        failures++;
        bad++;
        if (bad < 4) $display("block %0d (mode %0d) symbol %0d: decoded %0d expected %0d",
                              n_blocks_done, b.mode, i, s, b.sym[i]);
      end
    end
    $display("block %0d mode %0d: %0d symbols in %0d bytes", n_blocks_done, b.mode,
             b.sym.size(), got.size());
    n_blocks_done++;
    got.delete();
  endfunction

  // ---------------- input side ----------------
  string txt = "compression of text: the context tree finds the context of each byte; the estimator and coder do the rest. ";

  task automatic put(int x, bit last);
    @(negedge clk);
    in_valid = 0;
    while ($urandom_range(0, 5) == 0) @(negedge clk);
    in_valid = 1; in_sym = 8'(x); in_last = last;
    while (!in_ready) @(negedge clk);
    total_in++;
  endtask

  task automatic data_block(int n, bit rnd);
    blk_t b;
    req_mode = MODE_DATA;
    b.mode = MODE_DATA;
    for (int i = 0; i < n; i++) begin
      int x;
      x = rnd ? int'($urandom_range(0, 255)) : int'(txt[i % txt.len()]);
      if (rnd && i % 3 == 0) x = x % 8;
      b.sym.push_back(x);
      b.ctx.push_back(dm.step(x, i == n - 1));
      if (i == n - 1) exp_q.push_back(b);
      put(x, i == n - 1);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic image_block(int rows, int seed);
    blk_t b;
    req_mode = MODE_IMAGE;
    b.mode = MODE_IMAGE;
    im.reset();
    for (int k = 0; k < rows * W; k++) begin
      int x, m, c;
      x = test_pixel(k / W, k % W, seed);
      im.step(x, m, c);
      b.sym.push_back(m);
      b.ctx.push_back(c);
      if (k == rows * W - 1) exp_q.push_back(b);
      put(x, k == rows * W - 1);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic video_block(int n);
    blk_t b;
    int prev;
    req_mode = MODE_VIDEO;
    b.mode = MODE_VIDEO;
    prev = 0;
    for (int i = 0; i < n; i++) begin
      int x;
      x = (i * 7 + int'($urandom_range(0, 9))) % 256;
      b.sym.push_back(x);
      b.ctx.push_back(prev / 4);
      prev = x;
      if (i == n - 1) exp_q.push_back(b);
      put(x, i == n - 1);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else $display("  %-32s %0d", what, n);
  endtask

  initial begin
    dec = new(); dm = new(); im = new(W);
    req_mode = MODE_DATA; in_valid = 0; in_sym = 0; in_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    data_block(1500, 0);
    data_block(2500, 1);
    data_block(400, 0);
    image_block(8, 11);
    video_block(600);
    data_block(300, 0);
    while (exp_q.size() > 0) @(posedge clk);
    $display("symbols in %0d, bytes out %0d", total_in, total_out);
    expect_seen("mode changes", n_switch);
    checks++;
    if (n_switch != 3) begin failures++; $display("expected 3 mode changes, saw %0d", n_switch); end
    expect_seen("input held for a mode change", n_hold);
    expect_seen("context tree matches", dm.n_match);
    expect_seen("context tree new nodes", dm.n_new);
    expect_seen("context tree collisions", dm.n_coll);
    expect_seen("context areas exhausted", dm.n_full);
    expect_seen("block resets of the tree", n_blkrst);
    expect_seen("double buffer overlap", n_overlap);
    expect_seen("error feedback overflow guard", im.n_guard);
    expect_seen("coder carries", n_carry);
    expect_seen("packer multi-cycle runs", n_longrun);
    expect_seen("output back-pressure", n_outstall);
    expect_seen("coder back-pressure", n_coder_stall);
    checks++;
    if (n_blocks_done != 6) begin failures++; $display("%0d blocks came out, 6 expected", n_blocks_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
