// ant_multiplier: N x N unsigned multiplier protected by algorithmic noise
// tolerance (ANT) with a fixed-width reduced-precision replica.
//
// The main block (mdsp_array_mult) computes the exact 2N-bit product and is
// meant to run at a supply below its critical voltage, where long carry paths
// may miss the clock and corrupt y_a. A small replica (rpr_fixed_width) of
// only the upper N/2 operand bits, with compensated truncation, is short
// enough to stay correct at that supply. The error-correction block
// (ant_ec_block) registers both results and passes y_a on unless it differs
// from the replica by more than TH, in which case the replica's estimate is
// output instead. Default: N = 12, a 6-bit replica, TH = 455553.
//
// Interface: clk, rst_n (asynchronous, active low); x, y (N bits) sampled on
// every rising clk edge; y_hat (2N bits) and err (1 when the replica value was
// substituted) valid one cycle later, one new product per cycle.
module ant_multiplier #(
  parameter int unsigned N  = ant_pkg::N_DEFAULT,
  parameter int unsigned TH = ant_pkg::TH_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] y_hat,
  output logic           err
);
  logic [2*N-1:0] y_a;
  logic [N/2-1:0] y_r;

  mdsp_array_mult #(.N(N)) u_mdsp (
    .x (x),
    .y (y),
    .p (y_a)
  );

  rpr_fixed_width #(.N(N)) u_rpr (
    .xh (x[N-1:N/2]),
    .yh (y[N-1:N/2]),
    .pt (y_r)
  );

  ant_ec_block #(.N(N), .TH(TH)) u_ec (
    .clk   (clk),
    .rst_n (rst_n),
    .y_a   (y_a),
    .y_r   (y_r),
    .y_hat (y_hat),
    .err   (err)
  );
endmodule
