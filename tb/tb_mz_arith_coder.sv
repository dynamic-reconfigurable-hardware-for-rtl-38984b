// Self-checking testbench of the arithmetic coder.
//
// Random blocks of decisions (random states, MPS and biased bits) are coded
// while the byte output is stalled at random. Each block's bytes are then
// decoded by a reference decoder written here from the interval rules
// (MPS lower part, LPS upper part, LPS value about 63*(15/16)^state) and
// every decision must come back. A run of highly skewed decisions without
// output stalls checks that one decision is taken per clock.
module tb_mz_arith_coder;
  import lossless_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      in_valid, in_ready, out_valid, out_ready, out_last;
  decision_t in_dec;
  logic [7:0] out_byte;

  mz_arith_coder dut (.*);

  int checks = 0, failures = 0;

  // reference LPS table
  int ref_q [64];
  initial begin
    int v;
    v = 16128;
    for (int s = 0; s < 64; s++) begin
      ref_q[s] = (v / 256 < 1) ? 1 : v / 256;
      v = v - v / 16;
    end
  end

  decision_t blk [$];
  logic [7:0] bytes [$];
  bit stall_out;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) bytes.push_back(out_byte);
  end
  always @(negedge clk) out_ready = stall_out ? ($urandom_range(0, 3) != 0) : 1'b1;

  function automatic bit get_bit(int pos);
    if (pos / 8 >= bytes.size()) return 1'b0;
    return bytes[pos / 8][7 - pos % 8];
  endfunction

  task automatic decode_and_check();
    int a, d, pos;
    bit b;
    a = 255; d = 0; pos = 0;
    for (int i = 0; i < 8; i++) begin d = (d << 1) | get_bit(pos); pos++; end
    foreach (blk[i]) begin
      int q;
      q = ref_q[blk[i].state];
      if (d < a - q) begin b = blk[i].mps; a = a - q; end
      else begin b = ~blk[i].mps; d = d - (a - q); a = q; end
      while (a < 128) begin a = a << 1; d = (d << 1) | get_bit(pos); pos++; end
      checks++;
      if (b != blk[i].bit_val) begin
        failures++;
        if (failures < 10) $display("decode mismatch at decision %0d", i);
      end
    end
  endtask

  task automatic run_block(int n, int skew, bit stall);
    int cyc;
    blk.delete(); bytes.delete();
    stall_out = stall;
    for (int i = 0; i < n; i++) begin
      decision_t dd;
      dd.state   = (skew > 0) ? 6'd63 : 6'($urandom_range(0, 63));
      dd.mps     = (skew > 0) ? 1'b0 : 1'($urandom);
      dd.bit_val = ($urandom_range(0, 99) < ((skew > 0) ? 1 : 15)) ? ~dd.mps : dd.mps;
      if ($urandom_range(0, 9) == 0 && skew == 0) dd.bit_val = 1'($urandom);
      dd.last    = (i == n - 1);
      blk.push_back(dd);
    end
    cyc = 0;
    foreach (blk[i]) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_dec   = blk[i];
      cyc++;
      while (!in_ready) begin @(negedge clk); cyc++; end
    end
    @(negedge clk);
    in_valid = 1'b0;
    // wait for the last byte
    while (!(out_valid && out_ready && out_last)) @(posedge clk);
    @(posedge clk);
    if (skew > 0) begin
      checks++;
      if (cyc > n + 4) begin
        failures++;
        $display("throughput: %0d decisions took %0d cycles", n, cyc);
      end
    end
    decode_and_check();
  endtask

  initial begin
    in_valid = 1'b0; in_dec = '0; stall_out = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_block(2000, 1, 1'b0);
    for (int k = 0; k < 30; k++) run_block($urandom_range(1, 400), 0, k[0]);
    run_block(3000, 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
