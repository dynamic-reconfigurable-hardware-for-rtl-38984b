// Error energy and coding context index QE of the image modeller.
//
// Combinational. The activity of prediction errors around the pixel is
// estimated as  delta = dh + dv + 2*|ew|,  where ew is the prediction
// error of the previous pixel, and quantised into 8 levels by the
// thresholds 5, 15, 25, 42, 60, 85, 140: QE is the number of thresholds
// that delta reaches or exceeds.
//
// That QE is built from dv, dh and the previous error and has 8 levels
// (3 bits) follows the description; the weighting and the thresholds are
// those of CALIC's error energy as commonly published, a choice of this
// design.
module error_energy_quantizer (
  input  logic [9:0]       dh,
  input  logic [9:0]       dv,
  input  logic signed [8:0] ew,
  output logic [2:0]       qe
);

  localparam int unsigned NT = 7;
  localparam logic [11:0] THR [NT] = '{12'd5, 12'd15, 12'd25, 12'd42, 12'd60, 12'd85, 12'd140};

  logic [11:0] delta;
  logic [8:0]  ew_abs;

  always_comb begin
    ew_abs = ew[8] ? 9'(-ew) : 9'(ew);
    delta  = 12'(dh) + 12'(dv) + 12'({ew_abs, 1'b0});
    qe     = '0;
    for (int i = 0; i < NT; i++) begin
      if (delta >= THR[i]) qe = 3'(i + 1);
    end
  end

endmodule
