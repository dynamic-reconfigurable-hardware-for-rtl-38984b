// Mode (modelling configuration) controller of the compression core.
//
// The core has one modelling stage per kind of content: general data,
// image, and video (the last one outside this core). Only one is active.
// A requested mode different from the active one takes effect only when
// the core is idle: no block is open at the input and every block taken
// has left the coder as bytes. A block already open when the request
// arrives is finished in the old mode (accept stays high until its last
// symbol); after that, new input is held off (accept low) until the change. At the change, `switch_pulse` is high for one cycle; the
// core uses it to restart the probability statistics, since the contexts of
// the new mode mean something else.
//
// The time multiplexing of the modelling stages and the static estimator
// and coder behind them follow the system overview. The core swaps its
// modelling stage by partial reconfiguration of the device; here all
// stages are present and this controller selects one, which is this
// design's stand-in for that reconfiguration (reconfiguration time is not
// modelled).
module reconfig_controller
  import lossless_pkg::*;
#(
  parameter int unsigned INFLIGHT_W = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e req_mode,
  input  logic  take,           // an input symbol was accepted
  input  logic  take_last,      // ... and it closed its block
  input  logic  block_done,     // the last byte of a block left the coder
  output mode_e active_mode,
  output logic  accept,         // input may be taken in the active mode
  output logic  switch_pulse
);

  logic                  open_q;      // a block has started at the input
  logic [INFLIGHT_W-1:0] inflight_q;  // closed blocks not yet fully coded
  logic                  idle;

  assign idle   = !open_q && inflight_q == '0;
  assign accept = open_q || (req_mode == active_mode);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_mode  <= MODE_DATA;
      open_q       <= 1'b0;
      inflight_q   <= '0;
      switch_pulse <= 1'b0;
    end else begin
      switch_pulse <= 1'b0;
      if (take) open_q <= !take_last;
      case ({take && take_last, block_done})
        2'b10:   inflight_q <= inflight_q + 1'b1;
        2'b01:   inflight_q <= inflight_q - 1'b1;
        default: ;
      endcase
      if (req_mode != active_mode && idle && !take) begin
        active_mode  <= req_mode;
        switch_pulse <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   block_done |-> (inflight_q != '0 || take_last))
    else $error("block finished that was never started");

endmodule
