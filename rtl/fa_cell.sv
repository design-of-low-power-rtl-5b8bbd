// fa_cell: full adder, the 3-2 counter of the partial-product reduction tree.
// Adds three bits of equal weight and returns a sum bit of that weight and a
// carry bit of twice the weight. Purely combinational.
// Where only the carry of a cell is used (a carry-only "FC" cell in the
// reduction tree), the sum output is left unconnected and synthesis
// reduces the cell to a majority gate; there is no separate FC module.
module fa_cell (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
