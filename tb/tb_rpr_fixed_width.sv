// tb_rpr_fixed_width: exhaustive check of the fixed-width replica for N = 12.
// For every upper-half operand pair the output is compared with the reference
// replica arithmetic. The testbench also derives the ANT threshold from its
// definition, the largest |X*Y - y_r * 2^(3N/2)| over every full operand pair
// (per upper-half pair only the smallest and largest products matter), and
// checks it against the package default used by the error-correction block.
// Finally it checks that the compensation improves on plain truncation: the
// mean absolute error of the replica against the exact upper-half product
// must be smaller than that of keeping the MSP columns alone.
module tb_rpr_fixed_width;
  import ant_ref_pkg::*;
  localparam int N = 12;
  localparam int H = N / 2;
  logic [H-1:0] xh, yh, pt;
  int checks = 0, failures = 0;
  longint unsigned th = 0;
  longint          err_comp = 0, err_trunc = 0;

  rpr_fixed_width dut (.xh(xh), .yh(yh), .pt(pt));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint absdiff(longint a, longint b);
    return a > b ? a - b : b - a;
  endfunction

  initial begin
    for (int a = 0; a < (1 << H); a++) begin
      for (int b = 0; b < (1 << H); b++) begin
        longint unsigned xf, yf, r, lo, hi, rr, exact;
        xh = H'(a); yh = H'(b);
        #1;
        xf = longint'(a) << H;
        yf = longint'(b) << H;
        r  = rpr_ref(xf, yf, N);
        checks++;
        if (longint'(pt) != r) begin
          failures++;
          if (failures < 10) $display("FAIL xh=%0d yh=%0d pt=%0d expected=%0d", a, b, pt, r);
        end
        rr = longint'(pt) << (3 * H);
        lo = xf * yf;
        hi = (xf + (1 << H) - 1) * (yf + (1 << H) - 1);
        if (absdiff(lo, rr) > th) th = absdiff(lo, rr);
        if (absdiff(hi, rr) > th) th = absdiff(hi, rr);
        exact = longint'(a) * longint'(b);  // upper-half product, 2^(3N/2) units = 2^H
        err_comp  += absdiff(longint'(exact), longint'(pt) << H);
        err_trunc += absdiff(longint'(exact), longint'(msp_ref(xf, yf, N)) << H);
      end
    end
    checks++;
    if (th != longint'(ant_pkg::TH_DEFAULT)) begin
      failures++;
      $display("FAIL threshold %0d, package default %0d", th, ant_pkg::TH_DEFAULT);
    end
    checks++;
    if (err_comp >= err_trunc) begin
      failures++;
      $display("FAIL compensated error %0d not below truncation error %0d", err_comp, err_trunc);
    end
    $display("threshold %0d; summed |error| compensated %0d, truncated %0d", th, err_comp, err_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
