// tb_rpr_comp_vector: exhaustive check of the compensation vector for N = 12
// (all 4096 upper-half operand pairs). Each bit C_k and C_m is compared with
// the term named by the rules, evaluated on the full operands with global bit
// indices; it also checks that C_m fires for some inputs and not for others.
module tb_rpr_comp_vector;
  import ant_ref_pkg::*;
  localparam int N = 12;
  localparam int H = N / 2;
  logic [H-1:0] xh, yh, c;
  logic         cm;
  int checks = 0, failures = 0, cm_count = 0;

  rpr_comp_vector dut (.xh(xh), .yh(yh), .c(c), .cm(cm));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << H); a++) begin
      for (int b = 0; b < (1 << H); b++) begin
        longint unsigned xf, yf;
        logic [H-1:0]    c_exp;
        bit              cm_exp;
        xh = H'(a); yh = H'(b);
        #1;
        xf = longint'(a) << H;
        yf = longint'(b) << H;
        // C_k = x_(N-k) y_(N/2+k-1) for k = 1..H-1
        for (int k = 1; k <= H - 1; k++) c_exp[k-1] = xbit(xf, N - k) & xbit(yf, N / 2 + k - 1);
        cm_exp = cm_ref(xf, yf, N);
        c_exp[H-1] = (xbit(xf, N / 2) & xbit(yf, N - 1)) | cm_exp;
        cm_count += int'(cm);
        checks++;
        if (c !== c_exp || cm !== cm_exp) begin
          failures++;
          if (failures < 10) $display("FAIL xh=%0d yh=%0d c=%b exp=%b cm=%b exp=%b", a, b, c, c_exp, cm, cm_exp);
        end
      end
    end
    checks++;
    if (cm_count == 0 || cm_count == (1 << (2 * H))) begin
      failures++;
      $display("FAIL C_m count %0d", cm_count);
    end
    $display("C_m fired for %0d of %0d operand pairs", cm_count, 1 << (2 * H));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
