// Self-checking testbench of the context area double buffer: a producer
// pushes 0..3 areas per symbol and commits, a consumer drains at random;
// every record must come out whole and in order, and the producer must be
// able to fill one bank while the other is still waiting to be drained.
module tb_context_area_buffer;
  import lossless_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic fill_ready, push, commit, commit_last, out_valid, out_ready, out_last;
  logic [9:0] push_area;
  logic [7:0] commit_sym, out_sym;
  logic [1:0] out_count;
  logic [9:0] out_areas [3];
  context_area_buffer dut (.*);
  int checks = 0, failures = 0, overlap = 0;
  typedef struct { int n; int a[3]; int s; bit l; } rec_t;
  rec_t q [$];
  always @(posedge clk) out_ready <= ($urandom_range(0, 3) == 0);
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      rec_t r;
      bit bad;
      r = q.pop_front();
      bad = (out_count != 2'(r.n)) || (out_sym != 8'(r.s)) || (out_last != r.l);
      for (int i = 0; i < r.n; i++) if (out_areas[i] != 10'(r.a[i])) bad = 1;
      checks++;
      if (bad) failures++;
    end
    if (rst_n && out_valid && fill_ready) overlap++;
  end
  initial begin
    push = 0; commit = 0; push_area = 0; commit_sym = 0; commit_last = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      rec_t r;
      r.n = $urandom_range(0, 3); r.s = $urandom_range(0, 255); r.l = ($urandom_range(0, 9) == 0);
      @(negedge clk);
      while (!fill_ready) @(negedge clk);
      for (int i = 0; i < r.n; i++) begin
        r.a[i] = $urandom_range(0, 1023);
        push = 1; push_area = 10'(r.a[i]);
        @(negedge clk);
      end
      push = 0;
      commit = 1; commit_sym = 8'(r.s); commit_last = r.l;
      q.push_back(r);
      @(negedge clk);
      commit = 0;
    end
    while (q.size() > 0) @(posedge clk);
    checks++;
    if (overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
