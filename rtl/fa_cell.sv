// fa_cell: one-bit full adder, the cell of the array multipliers.
// s = a ^ b ^ ci, co = majority(a, b, ci). Combinational.
module fa_cell (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
