// Self-checking testbench of the symbol history: random pushes and clears
// against a queue kept here (newest first, at most 3 entries).
module tb_symbol_history;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear, push;
  logic [7:0] din;
  logic [7:0] hist [3];
  logic [1:0] count;
  symbol_history dut (.*);
  int checks = 0, failures = 0;
  int q [$];
  initial begin
    clear = 0; push = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // compare with the model
      checks++;
      if (count != 2'(q.size())) failures++;
      foreach (q[k]) begin
        checks++;
        if (hist[k] != 8'(q[k])) failures++;
      end
      clear = ($urandom_range(0, 40) == 0);
      push  = $urandom_range(0, 1);
      din   = 8'($urandom);
      if (clear) q.delete();
      else if (push) begin
        q.push_front(din);
        if (q.size() > 3) void'(q.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
