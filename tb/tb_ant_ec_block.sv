// tb_ant_ec_block: checks the error-correction block at N = 12, TH = 455553.
// After reset both registers must read zero. Then, each cycle, y_a and y_r are
// driven, and one cycle later y_hat and err are compared with the selection
// rule. Besides random pairs, the stimulus places |y_a - y_r * 2^18| exactly
// at TH and TH + 1 on both sides, so the comparison boundary is tested. It also
// checks that the outputs do not change before the sampling edge (one cycle
// of latency).
module tb_ant_ec_block;
  localparam int N  = 12;
  localparam int W  = 2 * N;
  localparam int H  = N / 2;
  localparam longint TH = 455553;

  logic         clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] y_a, y_hat;
  logic [H-1:0] y_r;
  logic         err;
  int checks = 0, failures = 0, n_err = 0, n_pass = 0;

  ant_ec_block dut (.clk(clk), .rst_n(rst_n), .y_a(y_a), .y_r(y_r), .y_hat(y_hat), .err(err));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input longint a_in, input longint r_in);
    longint a = a_in, r = r_in;
    longint al, d;
    logic   e_exp;
    logic [W-1:0] yh_exp, prev_hat;
    y_a = W'(a);
    y_r = H'(r);
    a   = a & ((longint'(1) << W) - 1);
    r   = r & ((longint'(1) << H) - 1);
    al  = r << (3 * H);
    d   = a - al;
    if (d < 0) d = -d;
    e_exp  = d > TH;
    yh_exp = e_exp ? W'(al) : W'(a);
    prev_hat = y_hat;
    #1;
    checks++;
    if (y_hat !== prev_hat) begin
      failures++;
      $display("FAIL output changed before the clock edge");
    end
    @(posedge clk);
    #1;
    checks++;
    if (y_hat !== yh_exp || err !== e_exp) begin
      failures++;
      if (failures < 10) $display("FAIL y_a=%0d y_r=%0d y_hat=%0d exp=%0d err=%b exp=%b", a, r, y_hat, yh_exp, err, e_exp);
    end
    if (e_exp) n_err++; else n_pass++;
  endtask

  initial begin
    y_a = '0; y_r = '0;
    // registers hold random values until reset
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (y_hat !== '0 || err !== 1'b0) begin
      failures++;
      $display("FAIL reset value");
    end
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int r = 0; r < (1 << H); r += 7) begin
      automatic longint base = longint'(r) << (3 * H);
      apply(base + TH, longint'(r));
      apply(base + TH + 1, longint'(r));
      if (base >= TH + 1) begin
        apply(base - TH, longint'(r));
        apply(base - TH - 1, longint'(r));
      end
    end
    for (int i = 0; i < 5000; i++) apply(longint'($urandom) & ((1 << W) - 1), longint'($urandom));
    checks++;
    if (n_err == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL selection never exercised both ways");
    end
    $display("replica selected %0d times, main result passed %0d times", n_err, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
