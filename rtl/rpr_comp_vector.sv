// rpr_comp_vector: truncation-error compensation vector of the fixed-width
// reduced-precision replica (RPR) multiplier.
//
// The replica multiplies the upper halves xh = X[N-1:N/2], yh = Y[N-1:N/2] and
// keeps only product columns of weight 2^(3N/2) and above (the MSP). The two
// highest dropped columns are used for compensation:
//   ICV  (beta)   : column 3N/2-1, terms x_(N-1-k) y_(N/2+k), k = 0..N/2-1
//   MICV (alpha)  : column 3N/2-2, terms x_(N-2-k) y_(N/2+k), k = 0..N/2-2
// The first N/2-1 ICV terms are passed on unchanged as the compensation bits
// C_1..C_(N/2-1); the replica adds them at its LSB column, i.e. at twice their
// own weight, which approximates the expected value of everything truncated.
// The last ICV term x_(N/2) y_(N-1) is OR-ed with a correction term C_m to form
// C_(N/2):
//   C_m1 = NOR(C_1..C_(N/2-1))      (the injected ICV bits are all zero)
//   C_m2 = OR(MICV terms)           (the MICV column is not empty)
//   C_m  = C_m1 AND C_m2
//   C_(N/2) = x_(N/2) y_(N-1) OR C_m
// so a product whose compensation would otherwise be zero although the MICV
// column holds ones still receives one unit of compensation. This gate
// structure is the design's; note that C_m2 is an OR, so C_m fires when MICV is
// non-zero.
//
// Interface: xh, yh (N/2 bits) -> c[k-1] = C_k for k = 1..N/2, and cm = C_m.
// Purely combinational and off the replica's critical path: C_(N/2) enters the
// replica at its last row.
module rpr_comp_vector #(
  parameter int unsigned N = ant_pkg::N_DEFAULT
) (
  input  logic [N/2-1:0] xh,
  input  logic [N/2-1:0] yh,
  output logic [N/2-1:0] c,
  output logic           cm
);
  localparam int unsigned H = N / 2;

  logic [H-2:0] icv_inj;  // C_1..C_(H-1): x_(N-k) y_(N/2+k-1)
  logic [H-2:0] micv;     // x_(N-2-k) y_(N/2+k), k = 0..H-2
  logic         cm1, cm2;

  always_comb begin
    for (int k = 0; k < int'(H) - 1; k++) begin
      icv_inj[k] = xh[H-1-k] & yh[k];
      micv[k]    = xh[H-2-k] & yh[k];
    end
  end

  assign cm1 = ~(|icv_inj);
  assign cm2 = |micv;
  assign cm  = cm1 & cm2;
  assign c   = {(xh[0] & yh[H-1]) | cm, icv_inj};
endmodule
