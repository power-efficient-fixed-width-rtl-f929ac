// ant_ec_block: error-correction block of the ANT multiplier.
//
// The main multiplier output y_a (2N bits, exact unless the over-scaled supply
// caused a timing error) and the replica output y_r (N/2 bits, an estimate of
// product bits [2N-1:3N/2]) are each captured in a register. The replica value
// is aligned to its weight, y_r * 2^(3N/2), the difference to y_a is formed and
// its magnitude compared with the threshold TH:
//   y_hat = y_a                 if |y_a - y_r * 2^(3N/2)| <= TH
//   y_hat = y_r * 2^(3N/2)      otherwise   (err = 1)
// TH is the largest difference that can occur with a correct y_a, so any larger
// difference must come from an error in the main block.
//
// Interface: clk, rst_n (asynchronous, active low; clears both registers),
// y_a, y_r in; y_hat (2N bits) and err out. Timing: the inputs are sampled on
// a rising clk edge, and y_hat / err follow combinationally from the
// registers, so they are valid one cycle after the operands. The register
// stage, subtractor, magnitude, comparator and multiplexer follow the
// block's structure; the reset is this design's own choice.
module ant_ec_block #(
  parameter int unsigned N  = ant_pkg::N_DEFAULT,
  parameter int unsigned TH = ant_pkg::TH_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [2*N-1:0] y_a,
  input  logic [N/2-1:0] y_r,
  output logic [2*N-1:0] y_hat,
  output logic           err
);
  localparam int unsigned W = 2 * N;
  localparam int unsigned H = N / 2;

  logic [W-1:0] ya_q;
  logic [H-1:0] yr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ya_q <= '0;
      yr_q <= '0;
    end else begin
      ya_q <= y_a;
      yr_q <= y_r;
    end
  end

  logic [W-1:0] yr_aligned;
  logic [W:0]   diff;  // two's complement y_a - y_r_aligned, one extra bit
  logic [W-1:0] mag;

  always_comb begin
    yr_aligned = {yr_q, {(W - H){1'b0}}};
    diff       = {1'b0, ya_q} - {1'b0, yr_aligned};
    mag        = diff[W] ? W'(-diff) : diff[W-1:0];
    err        = mag > W'(TH);
    y_hat      = err ? yr_aligned : ya_q;
  end
endmodule
