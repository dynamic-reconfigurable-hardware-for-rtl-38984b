// Gradient-adjusted predictor and texture pattern of the image modeller.
//
// Purely combinational. From the seven causal neighbours it forms the
// horizontal and vertical gradients
//   dh = |W-WW| + |N-NW| + |N-NE|,   dv = |W-NW| + |N-NN| + |NE-NNE|
// and predicts the pixel with shifts and adds only: a sharp horizontal
// edge (dv - dh > 80) predicts W, a sharp vertical one (dh - dv > 80)
// predicts N; otherwise the base value (W+N)/2 + (NE-NW)/4 is blended
// towards W or N in steps at gradient differences of 8 and 32
// ((3*base+W)/4, (base+W)/2 and the same with N). The prediction is kept
// in 0..255. The 6-bit texture pattern has one bit per neighbour N, W, NW,
// NE, NN, WW (bit 0..5), set when the neighbour is below the prediction.
//
// The description gives the inputs (7 neighbours), the use of dv and dh,
// shift/add-only arithmetic, the 6-bit texture pattern from 6 neighbours,
// and says the predictor is a simplified form of CALIC's GAP without
// saying how. This module uses CALIC's GAP rule and thresholds as they are
// commonly published; which 6 neighbours form the texture is this design's
// choice.
module gap_predictor
  import lossless_pkg::*;
(
  input  nbr_t             nbr,
  output logic [9:0]       dh,
  output logic [9:0]       dv,
  output logic [SYM_W-1:0] pred,
  output logic [5:0]       texture
);

  function automatic logic [9:0] absd(input logic [7:0] a, input logic [7:0] b);
    return (a > b) ? 10'(a - b) : 10'(b - a);
  endfunction

  logic signed [11:0] diff;
  logic signed [13:0] b4;     // 4 * base
  logic signed [13:0] w4, n4, p16;  // prediction scaled by 16
  logic signed [13:0] pv;

  always_comb begin
    dh   = absd(nbr.w, nbr.ww) + absd(nbr.n, nbr.nw) + absd(nbr.n, nbr.ne);
    dv   = absd(nbr.w, nbr.nw) + absd(nbr.n, nbr.nn) + absd(nbr.ne, nbr.nne);
    diff = 12'(signed'({2'b00, dv})) - 12'(signed'({2'b00, dh}));
    b4   = 14'(signed'({6'b0, nbr.w})) * 2 + 14'(signed'({6'b0, nbr.n})) * 2
         + 14'(signed'({6'b0, nbr.ne})) - 14'(signed'({6'b0, nbr.nw}));
    w4   = 14'(signed'({6'b0, nbr.w})) <<< 2;
    n4   = 14'(signed'({6'b0, nbr.n})) <<< 2;
    if (diff > 80)       p16 = w4 <<< 2;
    else if (diff < -80) p16 = n4 <<< 2;
    else if (diff > 32)  p16 = (b4 + w4) <<< 1;
    else if (diff > 8)   p16 = 3 * b4 + w4;
    else if (diff < -32) p16 = (b4 + n4) <<< 1;
    else if (diff < -8)  p16 = 3 * b4 + n4;
    else                 p16 = b4 <<< 2;
    pv = p16 >>> 4;
    if (pv < 0)        pred = '0;
    else if (pv > 255) pred = '1;
    else               pred = SYM_W'(pv);
    texture[0] = nbr.n  < pred;
    texture[1] = nbr.w  < pred;
    texture[2] = nbr.nw < pred;
    texture[3] = nbr.ne < pred;
    texture[4] = nbr.nn < pred;
    texture[5] = nbr.ww < pred;
  end

endmodule
