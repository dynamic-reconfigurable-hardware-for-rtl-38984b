// Image modeller: prediction, compound contexts and error feedback.
//
// Turns each pixel X (raster order, WIDTH pixels per line, in_last on the
// last pixel of the image) into a mapped prediction error and one of 512
// compound contexts for the probability estimator. Two pipeline stages:
//
//  Stage 1 (taking the pixel): the line buffer supplies the 7 causal
//    neighbours, gap_predictor forms dh, dv, the prediction Xh and the
//    6-bit texture pattern t; they are registered with X.
//  Stage 2: error_energy_quantizer forms QE from dh, dv and the error of
//    the previous pixel; the context is C = {t, QE} (9 bits). The error
//    feedback memory holds, per context, a 14-bit signed sum and a 5-bit
//    count of past errors of the corrected prediction. Their mean (sum /
//    count, 0 for an unused context) corrects the prediction:
//    Xt = Xh + mean, kept in 0..255. The error e = X - Xt is folded modulo
//    256 into -128..127 and mapped to 0..255 (0, -1, 1, -2, ... -> 0, 1,
//    2, 3, ...). e is then added to the sum and the count is raised; when
//    the count reaches 31 both are halved (overflow guard), which also
//    keeps the sum within 14 bits.
//
// The feedback memory is read asynchronously and written at the end of
// the cycle, so a pixel sees the update made by the one before it and one
// pixel per clock goes through. After the last pixel of an image the
// memory is cleared in 512 cycles (in_ready low) and the line buffer
// returns to the top-left corner.
//
// From the description and its diagram: 7-neighbour context, dv/dh,
// texture pattern (6 bits) plus QE (3 bits) = 512 contexts, error feedback
// by the mean of errors per context, 14-bit sum and 5-bit count with an
// overflow guard, 9-bit error mapped to 8 bits, three stored lines, a
// two-stage overlap of the current and next pixel, and feeding the
// corrected error back into the sum. The truncating mean, the halving rule
// and the modulo mapping are choices of this design.
module image_modeler
  import lossless_pkg::*;
#(
  parameter int unsigned WIDTH = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [SYM_W-1:0] in_pix,
  input  logic             in_last,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [SYM_W-1:0] out_sym,
  output logic [8:0]       out_ctx,
  output logic             out_last
);

  localparam int unsigned NCTX  = 512;
  localparam int unsigned SUM_W = 14;
  localparam int unsigned CNT_W = 5;

  // error feedback memory
  logic signed [SUM_W-1:0] sum_mem [NCTX];
  logic [CNT_W-1:0]        cnt_mem [NCTX];
  logic                    clr_q;
  logic [8:0]              clr_addr;

  // stage 1
  nbr_t       nbr;
  logic [9:0] dh, dv;
  logic [7:0] pred;
  logic [5:0] tex;
  logic       take;

  logic       s1_valid, s1_last;
  logic [7:0] s1_x, s1_pred;
  logic [9:0] s1_dh, s1_dv;
  logic [5:0] s1_tex;

  // stage 2
  logic signed [8:0]       ew_q;
  logic [2:0]              qe;
  logic [8:0]              ctx;
  logic signed [SUM_W-1:0] sum_r, sum_n;
  logic [CNT_W-1:0]        cnt_r, cnt_n;
  logic signed [SUM_W-1:0] mean;   // |mean| <= 255
  logic signed [9:0]       xt_full;
  logic signed [8:0]       e_full;   // X - Xt, -255..255
  logic [7:0]              xt, e_mapped;
  logic signed [7:0]       e8;
  logic                    s2_fire;

  assign s2_fire  = s1_valid && (!out_valid || out_ready);
  assign in_ready = !clr_q && (!s1_valid || s2_fire);
  assign take     = in_valid && in_ready;

  image_line_buffer #(.WIDTH(WIDTH)) u_lines (
    .clk, .rst_n, .restart (take && in_last), .adv (take), .pix (in_pix),
    .nbr
  );

  gap_predictor u_gap (.nbr, .dh, .dv, .pred, .texture (tex));

  error_energy_quantizer u_qe (.dh (s1_dh), .dv (s1_dv), .ew (ew_q), .qe);

  always_comb begin
    ctx   = {s1_tex, qe};
    sum_r = sum_mem[ctx];
    cnt_r = cnt_mem[ctx];
    if (cnt_r == '0) mean = '0;
    else             mean = sum_r / $signed({{(SUM_W-CNT_W){1'b0}}, cnt_r});
    xt_full = 10'(SUM_W'(signed'({2'b00, s1_pred})) + mean);
    if (xt_full < 0)        xt = '0;
    else if (xt_full > 255) xt = 8'hFF;
    else                    xt = 8'(xt_full);
    e_full   = 9'(signed'({1'b0, s1_x})) - 9'(signed'({1'b0, xt}));
    e8       = 8'(e_full);                                // modulo 256
    e_mapped = e8[7] ? 8'(~({e8, 1'b0})) : 8'({e8, 1'b0}); // 2e or -2e-1
    sum_n    = sum_r + SUM_W'(e_full);
    cnt_n    = cnt_r + 1'b1;
    if (cnt_n == '1) begin
      // overflow guard: halve sum and count
      sum_n = sum_n >>> 1;
      cnt_n = cnt_n >> 1;
    end
  end

  always_ff @(posedge clk) begin
    if (clr_q) begin
      sum_mem[clr_addr] <= '0;
      cnt_mem[clr_addr] <= '0;
    end else if (s2_fire) begin
      sum_mem[ctx] <= sum_n;
      cnt_mem[ctx] <= cnt_n;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clr_q     <= 1'b1;
      clr_addr  <= '0;
      s1_valid  <= 1'b0;
      s1_last   <= 1'b0;
      s1_x      <= '0;
      s1_pred   <= '0;
      s1_dh     <= '0;
      s1_dv     <= '0;
      s1_tex    <= '0;
      ew_q      <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
      out_ctx   <= '0;
      out_last  <= 1'b0;
    end else begin
      if (clr_q) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == 9'(NCTX - 1)) clr_q <= 1'b0;
      end
      // stage 1
      if (take) begin
        s1_valid <= 1'b1;
        s1_x     <= in_pix;
        s1_pred  <= pred;
        s1_dh    <= dh;
        s1_dv    <= dv;
        s1_tex   <= tex;
        s1_last  <= in_last;
      end else if (s2_fire) begin
        s1_valid <= 1'b0;
      end
      // stage 2
      if (s2_fire) begin
        out_valid <= 1'b1;
        out_sym   <= e_mapped;
        out_ctx   <= ctx;
        out_last  <= s1_last;
        ew_q      <= 9'(e_full);
        if (s1_last) begin
          // new image: clear the error feedback memory
          clr_q    <= 1'b1;
          clr_addr <= '0;
          ew_q     <= '0;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
