// ha_cell: half adder, the 2-2 counter of the partial-product reduction tree.
// Adds two bits of equal weight and returns a sum bit and a carry bit of twice
// the weight. Purely combinational. Used with its sum unconnected it becomes
// the carry-only "HC" cell (an AND gate) of the reduction tree.
module ha_cell (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
