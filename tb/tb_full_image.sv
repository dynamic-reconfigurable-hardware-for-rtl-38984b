// Full-size run of the compression core: one whole 512 x 512 image in
// image mode, then one 16 KiB general-data block, with every parameter at
// its default. The output is decoded by the reference decoder and every
// pixel error / byte must come back; the compressed sizes are reported in
// bits per symbol, and the coder must sustain close to one decision per
// clock while it is not held up by the output.
module tb_full_image;
  import lossless_pkg::*;
  import codec_ref_pkg::*;
  import image_ref_pkg::*;

  localparam int W = 512, H = 512, NDATA = 16384;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mode_e req_mode, active_mode;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [7:0] in_sym, out_byte;
  logic vid_in_valid, vid_in_ready, vid_in_last, vid_mod_valid, vid_mod_ready;
  logic [7:0] vid_in_sym;
  ctx_sym_t vid_mod;

  assign vid_in_ready  = 1'b0;
  assign vid_mod_valid = 1'b0;
  assign vid_mod       = '0;

  lossless_compressor_top dut (.*);

  int checks = 0, failures = 0;
  int exp_sym [$], exp_ctx [$];
  byte unsigned got [$];
  decoder dec;
  data_model dm;
  image_model im;
  int n_blocks = 0;
  longint busy_cycles = 0, decisions = 0;

  assign out_ready = 1'b1;

  always @(posedge clk) begin
    if (rst_n && dut.u_coder.in_valid) begin
      busy_cycles++;
      if (dut.u_coder.in_ready) decisions++;
    end
    if (rst_n && out_valid && out_ready) begin
      got.push_back(out_byte);
      if (out_last) begin
        int bad;
        bad = 0;
        dec.clear_stats();
        dec.start_block(got);
        foreach (exp_sym[i]) begin
          checks++;
          if (dec.decode_symbol(exp_ctx[i]) != exp_sym[i]) begin
            failures++; bad++;
            if (bad < 4) $display("block %0d symbol %0d decoded wrong", n_blocks, i);
          end
        end
        $display("block %0d: %0d symbols -> %0d bytes, %0.3f bits per symbol", n_blocks,
                 exp_sym.size(), got.size(), 8.0 * got.size() / exp_sym.size());
        n_blocks++;
        exp_sym.delete(); exp_ctx.delete(); got.delete();
      end
    end
  end

  task automatic put(int x, bit last);
    @(negedge clk);
    in_valid = 1; in_sym = 8'(x); in_last = last;
    while (!in_ready) @(negedge clk);
  endtask

  initial begin
    dec = new(); dm = new(); im = new(W);
    req_mode = MODE_IMAGE; in_valid = 0; in_sym = 0; in_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < W * H; k++) begin
      int x, m, c;
      x = test_pixel(k / W, k % W, 5);
      im.step(x, m, c);
      exp_sym.push_back(m); exp_ctx.push_back(c);
      put(x, k == W * H - 1);
    end
    @(negedge clk); in_valid = 0;
    while (n_blocks < 1) @(posedge clk);
    req_mode = MODE_DATA;
    for (int i = 0; i < NDATA; i++) begin
      int x;
      x = 97 + (i * i / 7 + i / 13) % 26;
      if (i % 11 == 0) x = 32;
      exp_sym.push_back(x); exp_ctx.push_back(dm.step(x, i == NDATA - 1));
      put(x, i == NDATA - 1);
    end
    @(negedge clk); in_valid = 0;
    while (n_blocks < 2) @(posedge clk);
    $display("coder: %0d decisions in %0d cycles with a decision waiting", decisions, busy_cycles);
    checks++;
    if (decisions * 100 < busy_cycles * 95) begin
      failures++;
      $display("coder rate below 0.95 decisions per clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
