// ant_pkg: constants shared by the ANT (algorithmic noise tolerance) multiplier.
//
// N_DEFAULT is the operand width of the main multiplier; 12 bits is the
// configuration the design is built and characterised for. TH_DEFAULT is the
// error-detection threshold used by the error-correction block for N = 12.
// The threshold follows the ANT rule Th = max over all inputs of
// |y_o - y_r|, where y_o is the exact 2N-bit product and y_r is the
// fixed-width replica output shifted to its weight 2^(3N/2). For N = 12 that
// maximum, taken over all 2^24 operand pairs, is 455553; it was evaluated with
// the replica arithmetic of rpr_fixed_width, and tb_rpr_fixed_width
// recomputes it. A different N needs its own threshold (N = 8: 5985,
// N = 4: 57).
package ant_pkg;
  localparam int unsigned N_DEFAULT  = 12;
  localparam int unsigned TH_DEFAULT = 455553;
endpackage
