// Lossless compression core: switchable modelling stage, probability
// estimator and binary arithmetic coder.
//
// Uncompressed symbols (bytes of general data, or 8-bit pixels of an image
// in raster order) enter with valid/ready; in_last closes a block (a data
// block or a whole image). The active mode selects the modelling stage:
//   MODE_DATA : data_context_modeler, context = deepest matched tree node
//   MODE_IMAGE: image_modeler, symbol = mapped prediction error,
//               context = {texture, QE} (512 contexts)
//   MODE_VIDEO: not built here; the input is passed out on vid_in_* and a
//               modelled stream (symbol, 10-bit context) is taken back on
//               vid_mod_*.
// The modelled stream goes to the probability estimator, which codes each
// symbol as 8 binary decisions with adaptive probabilities, and the
// arithmetic coder, which turns them into bytes at one decision per clock.
// Each block ends in its own byte-aligned code; out_last marks its last
// byte. A mode change (req_mode) lets an open block finish, waits until all
// blocks have left the coder, then restarts the estimator's statistics
// (2^18 cycles at the default size, in_ready low); the estimator also
// initialises after reset.
//
// Throughput is set by the coder: one decision, that is one eighth of a
// symbol, per clock.
module lossless_compressor_top
  import lossless_pkg::*;
#(
  parameter int unsigned IMG_WIDTH = 512,
  parameter int unsigned CTX_W     = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            req_mode,
  output mode_e            active_mode,
  // uncompressed input
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [SYM_W-1:0] in_sym,
  input  logic             in_last,
  // compressed output
  output logic             out_valid,
  input  logic             out_ready,
  output logic [7:0]       out_byte,
  output logic             out_last,
  // external video modelling stage
  output logic             vid_in_valid,
  input  logic             vid_in_ready,
  output logic [SYM_W-1:0] vid_in_sym,
  output logic             vid_in_last,
  input  logic             vid_mod_valid,
  output logic             vid_mod_ready,
  input  ctx_sym_t         vid_mod
);

  logic accept, switch_pulse, take;
  logic est_busy;

  // ---------------- input routing ----------------
  logic d_in_valid, d_in_ready, i_in_valid, i_in_ready;

  always_comb begin
    d_in_valid   = 1'b0;
    i_in_valid   = 1'b0;
    vid_in_valid = 1'b0;
    in_ready     = 1'b0;
    if (accept && !est_busy) begin
      unique case (active_mode)
        MODE_DATA:  begin d_in_valid   = in_valid; in_ready = d_in_ready;   end
        MODE_IMAGE: begin i_in_valid   = in_valid; in_ready = i_in_ready;   end
        MODE_VIDEO: begin vid_in_valid = in_valid; in_ready = vid_in_ready; end
        default: ;
      endcase
    end
  end
  assign vid_in_sym  = in_sym;
  assign vid_in_last = in_last;
  assign take        = in_valid && in_ready;

  // ---------------- modelling stages ----------------
  logic              d_out_valid, d_out_ready, d_out_last;
  logic [SYM_W-1:0]  d_out_sym;
  logic [AREA_W-1:0] d_out_ctx;
  logic              i_out_valid, i_out_ready, i_out_last;
  logic [SYM_W-1:0]  i_out_sym;
  logic [8:0]        i_out_ctx;

  data_context_modeler u_data (
    .clk, .rst_n,
    .in_valid (d_in_valid), .in_ready (d_in_ready), .in_sym, .in_last,
    .out_valid (d_out_valid), .out_ready (d_out_ready),
    .out_sym (d_out_sym), .out_ctx (d_out_ctx), .out_last (d_out_last),
    .out_count (), .out_areas ()
  );

  image_modeler #(.WIDTH(IMG_WIDTH)) u_image (
    .clk, .rst_n,
    .in_valid (i_in_valid), .in_ready (i_in_ready), .in_pix (in_sym), .in_last,
    .out_valid (i_out_valid), .out_ready (i_out_ready),
    .out_sym (i_out_sym), .out_ctx (i_out_ctx), .out_last (i_out_last)
  );

  // ---------------- modelled stream to the estimator ----------------
  logic     m_valid, m_ready;
  ctx_sym_t m;

  always_comb begin
    m_valid       = 1'b0;
    m             = '0;
    d_out_ready   = 1'b0;
    i_out_ready   = 1'b0;
    vid_mod_ready = 1'b0;
    unique case (active_mode)
      MODE_DATA: begin
        m_valid = d_out_valid; d_out_ready = m_ready;
        m = '{sym: d_out_sym, ctx: d_out_ctx, last: d_out_last};
      end
      MODE_IMAGE: begin
        m_valid = i_out_valid; i_out_ready = m_ready;
        m = '{sym: i_out_sym, ctx: AREA_W'(i_out_ctx), last: i_out_last};
      end
      MODE_VIDEO: begin
        m_valid = vid_mod_valid; vid_mod_ready = m_ready; m = vid_mod;
      end
      default: ;
    endcase
  end

  logic      dec_valid, dec_ready;
  decision_t dec;

  probability_estimator #(.CTX_W(CTX_W)) u_est (
    .clk, .rst_n, .clear (switch_pulse), .busy (est_busy),
    .in_valid (m_valid), .in_ready (m_ready),
    .in_sym (m.sym), .in_ctx (CTX_W'(m.ctx)), .in_last (m.last),
    .out_valid (dec_valid), .out_ready (dec_ready), .out_dec (dec)
  );

  mz_arith_coder u_coder (
    .clk, .rst_n,
    .in_valid (dec_valid), .in_ready (dec_ready), .in_dec (dec),
    .out_valid, .out_ready, .out_byte, .out_last
  );

  reconfig_controller u_cfg (
    .clk, .rst_n, .req_mode, .take, .take_last (in_last),
    .block_done (out_valid && out_ready && out_last),
    .active_mode, .accept, .switch_pulse
  );

endmodule
