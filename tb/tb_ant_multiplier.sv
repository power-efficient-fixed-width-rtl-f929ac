// tb_ant_multiplier: end-to-end test of the ANT multiplier at its default
// configuration (N = 12, TH = 455553), one operand pair per clock cycle.
//
// Every cycle a new x, y pair is applied and the result of the previous pair
// is checked, so a one-cycle latency at full throughput is verified. The
// expected y_hat is computed here from x*y and the replica reference.
// Silicon timing errors of the over-scaled main block cannot occur in RTL, so
// they are modelled by forcing the main block's product net: on selected
// cycles one bit of it is flipped, either a high bit (a large error, which
// must be detected and replaced by the replica value) or a low bit (a small
// error within the threshold, which passes through). In all cases the output
// must stay within TH of the exact product. Counted mechanisms: clean
// products, detected-and-replaced errors, tolerated small errors, and the
// MICV correction term C_m of the replica; each must occur at least once.
module tb_ant_multiplier;
  import ant_ref_pkg::*;
  localparam int N  = ant_pkg::N_DEFAULT;
  localparam int W  = 2 * N;
  localparam int H  = N / 2;
  localparam longint TH = longint'(ant_pkg::TH_DEFAULT);

  logic         clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] x = '0, y = '0;
  logic [W-1:0] y_hat;
  logic         err;
  int checks = 0, failures = 0;
  int n_clean = 0, n_replaced = 0, n_tolerated = 0, n_cm = 0;

  ant_multiplier dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .y_hat(y_hat), .err(err));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint absdiff(longint a, longint b);
    return a > b ? a - b : b - a;
  endfunction

  // Expected outputs for operands a, b whose main-block product is replaced
  // by ya (ya = a*b when no error is injected).
  longint exp_hat, exp_exact;
  bit     exp_err;
  int     exp_kind;  // 0 clean, 1 replaced, 2 tolerated
  bit     pending = 1'b0;
  logic [W-1:0] forced_ya = '0;  // value held on the forced product net

  task automatic check_previous();
    if (!pending) return;
    checks++;
    if (longint'(y_hat) != exp_hat || err != exp_err) begin
      failures++;
      if (failures < 10) $display("FAIL y_hat=%0d exp=%0d err=%b exp=%b", y_hat, exp_hat, err, exp_err);
    end
    checks++;
    if (absdiff(longint'(y_hat), exp_exact) > TH) begin
      failures++;
      $display("FAIL output %0d further than TH from exact %0d", y_hat, exp_exact);
    end
    if (exp_kind == 0) n_clean++;
    else if (exp_kind == 1) n_replaced++;
    else n_tolerated++;
  endtask

  // Apply one pair for one cycle; inject = 0 none, 1 high-bit flip, 2 low-bit flip.
  task automatic step(input logic [N-1:0] a, input logic [N-1:0] b, input int inject);
    longint exact, ya, yr_al;
    int     bitpos;
    @(negedge clk);
    check_previous();
    release dut.y_a;
    x = a; y = b;
    exact = longint'(a) * longint'(b);
    ya    = exact;
    if (inject == 1) bitpos = W - 1 - int'($urandom_range(0, 3));
    else             bitpos = int'($urandom_range(0, 11));
    if (inject != 0) begin
      ya = ya ^ (longint'(1) << bitpos);
      forced_ya = W'(ya);
      force dut.y_a = forced_ya;
    end
    yr_al     = longint'(rpr_ref(longint'(a), longint'(b), N)) << (3 * H);
    exp_err   = absdiff(ya, yr_al) > TH;
    exp_hat   = exp_err ? yr_al : ya;
    exp_exact = exact;
    exp_kind  = exp_err ? 1 : (inject != 0 ? 2 : 0);
    pending   = 1'b1;
    #1;
    if (dut.u_rpr.u_comp.cm) n_cm++;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (y_hat !== '0 || err !== 1'b0) begin
      failures++;
      $display("FAIL reset value");
    end
    @(negedge clk);
    rst_n = 1'b1;
    step({N{1'b1}}, {N{1'b1}}, 0);
    step('0, '0, 0);
    step({N{1'b1}}, {N{1'b1}}, 1);
    for (int i = 0; i < 20000; i++) begin
      automatic int r = int'($urandom_range(0, 9));
      step(N'($urandom), N'($urandom), r == 0 ? 1 : (r == 1 ? 2 : 0));
    end
    @(negedge clk);
    check_previous();
    release dut.y_a;
    checks++;
    if (n_clean == 0 || n_replaced == 0 || n_tolerated == 0 || n_cm == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("clean %0d, errors detected and replaced %0d, small errors tolerated %0d, C_m fired %0d",
             n_clean, n_replaced, n_tolerated, n_cm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
