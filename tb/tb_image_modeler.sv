// Self-checking testbench of the image modeller at its full line width.
//
// Two synthetic pictures (512 x 6 and 512 x 3 pixels) go through with
// random input pauses and output stalls. The reference model in
// image_ref_pkg predicts every mapped error, context and end flag; the
// second picture checks that the error feedback memory and the line store
// start afresh. The overflow guard must fire, and a stall-free stretch
// must pass one pixel per clock.
module tb_image_modeler;
  import lossless_pkg::*;
  import image_ref_pkg::*;
  localparam int W = 512;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [7:0] in_pix, out_sym;
  logic [8:0] out_ctx;
  image_modeler dut (.*);
  int checks = 0, failures = 0;
  typedef struct { int m; int c; bit l; } exp_t;
  exp_t q [$];
  image_model model;
  bit stall = 1'b1, gaps = 1'b1;
  int n_out = 0;

  always @(posedge clk) out_ready <= stall ? ($urandom_range(0, 3) != 0) : 1'b1;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      n_out++;
      if (out_sym != 8'(e.m) || out_ctx != 9'(e.c) || out_last != e.l) begin
        failures++;
        if (failures < 10) $display("mismatch at output %0d: sym %0d/%0d ctx %0d/%0d", n_out, out_sym, e.m, out_ctx, e.c);
      end
    end
  end

  task automatic picture(int rows, int seed);
    model.reset();
    for (int k = 0; k < rows * W; k++) begin
      exp_t e;
      int x;
      x = test_pixel(k / W, k % W, seed);
      @(negedge clk);
      in_valid = 0;
      while (gaps && $urandom_range(0, 4) == 0) @(negedge clk);
      in_valid = 1; in_pix = 8'(x); in_last = (k == rows * W - 1);
      while (!in_ready) @(negedge clk);
      model.step(x, e.m, e.c);
      e.l = in_last;
      q.push_back(e);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int c0, n0;
    model = new(W);
    in_valid = 0; in_pix = 0; in_last = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    picture(6, 7);
    picture(3, 40);
    while (q.size() > 0) @(posedge clk);
    // rate: no pauses, no stalls
    stall = 0; gaps = 0;
    n0 = n_out; c0 = 0;
    fork
      picture(2, 3);
      begin
        while (!(in_valid && in_ready)) @(posedge clk);
        while (n_out - n0 < 2 * W) begin @(posedge clk); c0++; end
      end
    join
    checks++;
    if (c0 > 2 * W + 4) begin failures++; $display("rate: %0d pixels took %0d cycles", 2 * W, c0); end
    checks++;
    if (model.n_guard == 0) begin failures++; $display("overflow guard never used"); end
    $display("overflow guard used %0d times", model.n_guard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
