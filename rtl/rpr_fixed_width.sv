// rpr_fixed_width: fixed-width reduced-precision replica (RPR) multiplier with
// truncation-error compensation, the error-estimating half of the ANT
// multiplier.
//
// It multiplies only the upper halves xh = X[N-1:N/2] and yh = Y[N-1:N/2] and
// delivers only the upper N/2 bits of their product, i.e. an estimate of bits
// [2N-1:3N/2] of the full product X*Y. Of the (N/2) x (N/2) partial-product
// array it keeps the most significant part (MSP): the terms x_i y_j whose
// weight is 2^(3N/2) or more. Everything below is dropped and replaced by the
// compensation vector from rpr_comp_vector, whose bits C_1..C_(N/2) are added
// at the LSB column of the kept part:
//   P_t / 2^(3N/2) = sum over MSP of x_i y_j 2^(i+j-3N/2) + sum_k C_k.
// The array is built from full-adder cells (fa_cell) as in an array
// multiplier: row r (yh bit r) adds its r MSP terms to the running sum, with
// C_r as the carry-in of the row's rightmost (LSB) cell; C_(N/2), the
// MICV-controlled bit, enters in a final row at the bottom of the array, away
// from the critical path. About half the adder cells of a full-width replica
// are saved. The compensation bits entering as carry-ins of the right-hand
// cells follow the design's array drawing; the exact row each C_k enters, and
// the plain ripple rows, are this implementation's choice.
//
// The result never exceeds N/2 bits: with all inputs one the MSP sums to
// 2^(N/2) - N/2 - 1 and the compensation to N/2. Every intermediate row sum is
// at most the final one, so the carry out of each row's top cell is always
// zero and is left unused.
//
// Interface: xh, yh (N/2 bits) -> pt (N/2 bits). Purely combinational.
module rpr_fixed_width #(
  parameter int unsigned N = ant_pkg::N_DEFAULT
) (
  input  logic [N/2-1:0] xh,
  input  logic [N/2-1:0] yh,
  output logic [N/2-1:0] pt
);
  localparam int unsigned H = N / 2;

  logic [H-1:0] c;

  rpr_comp_vector #(.N(N)) u_comp (
    .xh (xh),
    .yh (yh),
    .c  (c),
    .cm ()
  );

  // Row r (yh bit r, r = 1..H-1) holds the MSP terms x_(H-r+w) y_r at output
  // weight 2^w, w = 0..r-1 (local bit indices of xh, yh). g_row[r].sum is the
  // running sum after row r; each row is a ripple row of full adders whose
  // carry-in at the LSB cell is the compensation bit C_r. The last row, H,
  // holds no partial products and adds only C_(N/2). Row 0 holds no MSP term.
  for (genvar r = 1; r <= H; r++) begin : g_row
    logic [H-1:0] pp;
    logic [H-1:0] prev;
    logic [H-1:0] sum;
    logic [H:0]   carry;
    for (genvar w = 0; w < H; w++) begin : g_pp
      if (r < H && w < r) begin : g_term
        assign pp[w] = xh[H-r+w] & yh[r];
      end else begin : g_none
        assign pp[w] = 1'b0;
      end
    end
    if (r == 1) begin : g_top
      assign prev = '0;
    end else begin : g_chain
      assign prev = g_row[r-1].sum;
    end
    assign carry[0] = c[r-1];
    for (genvar w = 0; w < H; w++) begin : g_cell
      fa_cell u_fa (
        .a  (prev[w]),
        .b  (pp[w]),
        .ci (carry[w]),
        .s  (sum[w]),
        .co (carry[w+1])
      );
    end
  end

  assign pt = g_row[H].sum;
endmodule
