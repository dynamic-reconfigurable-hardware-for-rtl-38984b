// Shared types and constants of the lossless compression core.
//
// The core has a modelling stage (general-data context tree or image
// predictor), a probability estimator that turns every 8-bit symbol into
// binary decisions, and a multiplication-free binary arithmetic coder.
// This package holds the record types passed between those stages and the
// two small formulas that define the adaptive probability model: the
// 64-entry LPS table used by the coder and the state update used by the
// estimator. Both formulas are this design's own choice; the coder's
// 64-entry, 6-bit LPS table and 6-bit probability state follow the
// coder's block diagram.
package lossless_pkg;

  localparam int unsigned SYM_W   = 8;   // symbol (byte / pixel) width
  localparam int unsigned AREA_W  = 10;  // context area index width (1024 areas)
  localparam int unsigned STATE_W = 6;   // probability state index width
  localparam int unsigned LPS_W   = 6;   // LPS sub-interval width
  localparam int unsigned RANGE_W = 8;   // coder interval register width

  // Which modelling configuration is loaded.
  typedef enum logic [1:0] {
    MODE_DATA  = 2'd0,
    MODE_IMAGE = 2'd1,
    MODE_VIDEO = 2'd2    // modelled outside this core
  } mode_e;

  // Modelling output: one symbol together with its context number.
  typedef struct packed {
    logic [SYM_W-1:0]  sym;
    logic [AREA_W-1:0] ctx;
    logic              last;   // last symbol of the block
  } ctx_sym_t;

  // One binary coding event for the arithmetic coder.
  typedef struct packed {
    logic               bit_val;  // decision to code
    logic               mps;      // current more-probable symbol
    logic [STATE_W-1:0] state;    // probability state index
    logic               last;     // last decision of the block
  } decision_t;

  // One node of the general-data context tree (one tree memory word).
  typedef struct packed {
    logic [AREA_W-1:0] area;    // context area: where this node's statistics live
    logic [AREA_W-1:0] prefix;  // context area of the parent node
    logic [SYM_W-1:0]  sym;     // symbol that leads from the parent to this node
  } tree_node_t;

  // Causal neighbourhood of the current pixel (7 neighbours).
  typedef struct packed {
    logic [SYM_W-1:0] n, w, nn, ww, nw, ne, nne;
  } nbr_t;

  // LPS sub-interval for a probability state:
  //   q(s) = max(1, floor(v_s / 256)), v_0 = 63*256, v_{s+1} = v_s - floor(v_s/16)
  // i.e. roughly 63 * (15/16)^s. Evaluated at elaboration time only.
  function automatic logic [LPS_W-1:0] lps_value(input int unsigned s);
    int unsigned v;
    v = 63 * 256;
    for (int unsigned i = 0; i < s; i++) v = v - (v >> 4);
    v = v >> 8;
    if (v < 1) v = 1;
    return LPS_W'(v);
  endfunction

  // Adaptive state update after coding one decision:
  // on the MPS the state moves one step towards a more skewed estimate,
  // on the LPS it halves, and at state 0 an LPS swaps the MPS.
  function automatic logic [STATE_W:0] next_state(input logic [STATE_W-1:0] s,
                                                  input logic mps,
                                                  input logic bit_val);
    logic [STATE_W-1:0] ns;
    logic               nm;
    nm = mps;
    if (bit_val == mps) begin
      ns = (s == '1) ? s : s + 1'b1;
    end else if (s == '0) begin
      ns = '0;
      nm = ~mps;
    end else begin
      ns = s >> 1;
    end
    return {nm, ns};
  endfunction

endpackage
