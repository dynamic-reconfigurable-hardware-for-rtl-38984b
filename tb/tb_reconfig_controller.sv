// Self-checking testbench of the mode controller. Random mode requests,
// block starts/ends and coder completions are applied; a cycle-exact model
// of the controller (mode changes only while no block is open or in the
// coder and nothing is taken that cycle, one-cycle switch pulse, an open
// block may always be finished) is compared
// with the outputs every cycle. It also counts that switches were both
// granted and held back.
module tb_reconfig_controller;
  import lossless_pkg::*;

  logic clk, rst_n = 1'b0;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  mode_e req_mode, active_mode;
  logic take, take_last, block_done, accept, switch_pulse;

  reconfig_controller dut (.*);

  int checks = 0, failures = 0;
  int switches = 0, held = 0;

  // reference state
  mode_e m_mode;
  bit    m_open, m_pulse;
  int    m_inflight;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    req_mode = MODE_DATA; take = 0; take_last = 0; block_done = 0;
    m_mode = MODE_DATA; m_open = 0; m_pulse = 0; m_inflight = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // drive inputs for this cycle (legal: only take when accepted,
      // block_done only for a closed block)
      if ($urandom_range(0, 199) == 0) req_mode = mode_e'($urandom_range(0, 2));
      take       = accept && $urandom_range(0, 2) == 0;
      take_last  = take && $urandom_range(0, 15) == 0;
      block_done = m_inflight > 0 && $urandom_range(0, 9) == 0;
      #1;
      check("accept", int'(accept), int'(m_open || req_mode == m_mode));
      @(posedge clk);
      // model update
      m_pulse = 0;
      if (req_mode != m_mode) begin
        if (!m_open && m_inflight == 0 && !take) begin
          m_mode = req_mode; m_pulse = 1; switches++;
        end else held++;
      end
      if (take) m_open = !take_last;
      if (take && take_last) m_inflight++;
      if (block_done) m_inflight--;
      @(negedge clk);
      check("active_mode", int'(active_mode), int'(m_mode));
      check("switch_pulse", int'(switch_pulse), int'(m_pulse));
    end
    checks++;
    if (switches < 5 || held < 5) begin
      failures++;
      $display("too few switches (%0d) or held requests (%0d)", switches, held);
    end
    $display("switches=%0d held cycles=%0d", switches, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
