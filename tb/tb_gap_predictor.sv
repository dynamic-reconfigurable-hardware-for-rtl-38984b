// Self-checking testbench of the gradient-adjusted predictor and the error
// energy quantiser: random and smooth neighbourhoods (so that every branch
// of the prediction rule is taken) against the reference in image_ref_pkg.
module tb_gap_predictor;
  import lossless_pkg::*;
  import image_ref_pkg::*;
  nbr_t nbr;
  logic [9:0] dh, dv;
  logic [7:0] pred;
  logic [5:0] texture;
  logic signed [8:0] ew;
  logic [2:0] qe;
  gap_predictor dut (.*);
  error_energy_quantizer u_qe (.dh, .dv, .ew, .qe);
  int checks = 0, failures = 0;
  int seen_q [8];
  initial begin
    for (int i = 0; i < 20000; i++) begin
      int edh, edv, ep, et, base, spread, q;
      base = $urandom_range(0, 255);
      spread = (i % 4 == 0) ? 255 : (i % 4) * 6;
      nbr.n   = 8'($urandom_range(0, 255));
      nbr.w   = 8'($urandom_range(0, 255));
      nbr.nn  = 8'($urandom_range(0, 255));
      nbr.ww  = 8'($urandom_range(0, 255));
      nbr.nw  = 8'($urandom_range(0, 255));
      nbr.ne  = 8'($urandom_range(0, 255));
      nbr.nne = 8'($urandom_range(0, 255));
      if (spread < 255) begin
        nbr.n   = 8'((base + $urandom_range(0, spread)) % 256);
        nbr.w   = 8'((base + $urandom_range(0, spread)) % 256);
        nbr.nn  = 8'((base + $urandom_range(0, spread)) % 256);
        nbr.ww  = 8'((base + $urandom_range(0, spread)) % 256);
        nbr.nw  = 8'((base + $urandom_range(0, spread)) % 256);
        nbr.ne  = 8'((base + $urandom_range(0, spread)) % 256);
        nbr.nne = 8'((base + $urandom_range(0, spread)) % 256);
      end
      ew = 9'(int'($urandom_range(0, 100)) - 50);
      if (i % 8 == 1) begin
        nbr = {7{8'(base)}};
        ew  = 9'(int'($urandom_range(0, 4)) - 2);
      end
      #1;
      gap(nbr.n, nbr.w, nbr.nn, nbr.ww, nbr.nw, nbr.ne, nbr.nne, edh, edv, ep, et);
      q = qe_of(edh, edv, int'(ew));
      seen_q[q]++;
      checks++;
      if (dh != 10'(edh) || dv != 10'(edv) || pred != 8'(ep) || texture != 6'(et) || qe != 3'(q)) begin
        failures++;
        if (failures < 10) $display("mismatch: pred %0d/%0d tex %0d/%0d qe %0d/%0d", pred, ep, texture, et, qe, q);
      end
    end
    foreach (seen_q[i]) begin
      checks++;
      if (seen_q[i] == 0) begin failures++; $display("QE level %0d never seen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
