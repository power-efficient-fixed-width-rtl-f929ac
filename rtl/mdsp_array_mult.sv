// mdsp_array_mult: main DSP block (MDSP) of the ANT multiplier, a full-precision
// N x N unsigned array multiplier.
//
// The product P = sum_j sum_i x_i y_j 2^(i+j) is formed as an array: row j holds
// the partial-product bits x_i & y_j, and each row is added to the running sum
// of the rows above it by a ripple-carry row of full adders (fa_cell), the
// classic carry-propagate array. Row j contributes output bit p[j]; the last
// row's sum and carry give the upper N bits. The design treats both operands as
// unsigned, as the algebra of the design does; no two's-complement sign
// handling is added.
//
// Interface: x, y (N bits) -> p (2N bits). Purely combinational. In the ANT
// scheme this block runs at an over-scaled (too low) supply, so in silicon its
// output may be wrong for inputs that excite long carry paths; the
// error-correction block downstream catches that.
module mdsp_array_mult #(
  parameter int unsigned N = ant_pkg::N_DEFAULT
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  // g_row[j].acc is the running sum after row j has been added, with its
  // carry-out kept as the top bit (N+1 bits); its LSB retires as p[j].
  for (genvar j = 0; j < N; j++) begin : g_row
    logic [N:0]   acc;
    logic [N-1:0] pp;      // partial products x_i & y_j
    assign pp = x & {N{y[j]}};
    if (j == 0) begin : g_first
      // Row 0: the plain partial products, no addition.
      assign acc = {1'b0, pp};
    end else begin : g_add
      logic [N-1:0] addend;  // previous row shifted down by one column
      logic [N:0]   carry;
      assign addend   = g_row[j-1].acc[N:1];
      assign carry[0] = 1'b0;
      for (genvar i = 0; i < N; i++) begin : g_cell
        fa_cell u_fa (
          .a  (pp[i]),
          .b  (addend[i]),
          .ci (carry[i]),
          .s  (acc[i]),
          .co (carry[i+1])
        );
      end
      assign acc[N] = carry[N];
    end
    assign p[j] = acc[0];
  end

  assign p[2*N-1:N] = g_row[N-1].acc[N:1];
endmodule
