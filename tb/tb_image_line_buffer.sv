// Self-checking testbench of the three-line pixel store: random pictures of
// several lines (with pauses between pixels) are written, and before each
// pixel all seven neighbours are compared with the picture kept here, zero
// outside it. A restart in mid-picture must begin a fresh picture.
module tb_image_line_buffer;
  import lossless_pkg::*;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic restart, adv;
  logic [7:0] pix;
  nbr_t nbr;
  image_line_buffer #(.WIDTH(W)) dut (.*);
  int checks = 0, failures = 0;
  int img [$];
  function automatic int px(int r, int c);
    if (r < 0 || c < 0 || c >= W) return 0;
    return img[r * W + c];
  endfunction
  task automatic run_picture(int npix);
    img.delete();
    for (int k = 0; k < npix; k++) begin
      int r, c;
      r = k / W; c = k % W;
      @(negedge clk);
      adv = 0; restart = 0;
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      checks++;
      if (nbr.n != 8'(px(r-1, c)) || nbr.w != 8'(px(r, c-1)) || nbr.nn != 8'(px(r-2, c)) ||
          nbr.ww != 8'(px(r, c-2)) || nbr.nw != 8'(px(r-1, c-1)) || nbr.ne != 8'(px(r-1, c+1)) ||
          nbr.nne != 8'(px(r-2, c+1))) begin
        failures++;
        if (failures < 10) $display("neighbour mismatch at row %0d col %0d", r, c);
      end
      adv = 1; pix = 8'($urandom);
      img.push_back(int'(pix));
    end
    @(negedge clk);
    adv = 0;
  endtask
  initial begin
    restart = 0; adv = 0; pix = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_picture(W * 7 + 5);
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    run_picture(W * 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
