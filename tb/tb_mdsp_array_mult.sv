// tb_mdsp_array_mult: checks the main array multiplier at its default width
// against the arithmetic product, over corner operands and random pairs.
module tb_mdsp_array_mult;
  localparam int unsigned N = 12;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  mdsp_array_mult dut (.x(x), .y(y), .p(p));

  task automatic check_one(input logic [N-1:0] a, input logic [N-1:0] b);
    logic [2*N-1:0] expected;
    x = a; y = b;
    #1;
    expected = (2*N)'(a) * (2*N)'(b);
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d p=%0d expected=%0d", a, b, p, expected);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [N-1:0] corners [6] = '{N'(0), N'(1), N'(2), {N{1'b1}}, {1'b1, {(N-1){1'b0}}}, {1'b0, {(N-1){1'b1}}}};
    foreach (corners[i]) foreach (corners[j]) check_one(corners[i], corners[j]);
    for (int i = 0; i < 20000; i++) check_one(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
