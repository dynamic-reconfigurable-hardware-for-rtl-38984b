// Self-checking testbench of the context tree memory: random writes of
// tree nodes and reads compared, one cycle later, with a copy kept here.
module tb_context_tree_sram;
  import lossless_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic wr_en, rd_en;
  logic [10:0] wr_addr, rd_addr;
  tree_node_t wr_data, rd_data;
  context_tree_sram dut (.*);
  int checks = 0, failures = 0;
  tree_node_t model [int];
  initial begin
    int pend_addr;
    bit pend;
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = '0;
    pend = 0; pend_addr = 0;
    for (int i = 0; i < 1312; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 11'(i);
      wr_data = '{area: 10'($urandom), prefix: 10'($urandom), sym: 8'($urandom)};
      model[i] = wr_data;
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rd_data != model[pend_addr]) failures++;
      end
      wr_en = $urandom_range(0, 1);
      wr_addr = 11'($urandom_range(0, 1311));
      wr_data = '{area: 10'($urandom), prefix: 10'($urandom), sym: 8'($urandom)};
      rd_en = $urandom_range(0, 1);
      rd_addr = 11'($urandom_range(0, 1311));
      if (wr_en && rd_en && rd_addr == wr_addr) rd_en = 0;
      pend = rd_en; pend_addr = rd_addr;
      if (wr_en) model[int'(wr_addr)] = wr_data;
    end
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
