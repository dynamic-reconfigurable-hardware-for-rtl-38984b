// Self-checking testbench of the busy-bit tracker and area allocator.
//
// Random read-then-mark sequences over all 1312 slots are checked against
// a set of busy slots kept here; block resets must free every slot at once
// and restart the areas at 1; allocating 1023 areas must drop area_avail.
module tb_area_free_tracker;
  import lossless_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic block_reset, rd_en, rd_busy, mark, alloc, area_avail;
  logic [10:0] rd_slot, mark_slot;
  logic [9:0] next_area;
  area_free_tracker dut (.*);
  int checks = 0, failures = 0;
  bit busy_m [int];
  int area_m;

  task automatic read_slot(int s, output bit b);
    @(negedge clk);
    rd_en = 1; rd_slot = 11'(s); mark = 0; alloc = 0; block_reset = 0;
    @(negedge clk);
    rd_en = 0;
    b = rd_busy;
  endtask

  initial begin
    bit b;
    block_reset = 0; rd_en = 0; mark = 0; alloc = 0; rd_slot = 0; mark_slot = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    area_m = 1;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 3000; i++) begin
        int s;
        s = $urandom_range(0, 1311);
        read_slot(s, b);
        checks++;
        if (b != busy_m.exists(s)) failures++;
        if ($urandom_range(0, 1)) begin
          mark = 1; mark_slot = 11'(s); alloc = 1;
          busy_m[s] = 1;
          checks++;
          if (next_area != 10'(area_m) || area_avail != (area_m <= 1023)) failures++;
          if (area_m <= 1023) area_m++;
          @(negedge clk);
          mark = 0; alloc = 0;
        end
      end
      // one-cycle reset of the whole tree
      @(negedge clk);
      block_reset = 1;
      @(negedge clk);
      block_reset = 0;
      busy_m.delete();
      area_m = 1;
      for (int s = 0; s < 1312; s += 7) begin
        read_slot(s, b);
        checks++;
        if (b) failures++;
      end
    end
    checks++;
    if (next_area != 10'd1 || !area_avail) failures++;
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
