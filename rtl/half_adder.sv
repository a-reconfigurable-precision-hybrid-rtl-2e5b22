// half_adder: 2:2 counter used by the reduction trees (s + 2*co = x + y).
// Used where a column needs to lose exactly one bit in a stage.
// Combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic co
);
  assign s  = x ^ y;
  assign co = x & y;
endmodule
