// full_adder: 3:2 counter used by the reduction trees (s + 2*co = x + y + z).
// The trees are built from these cells as the classic Wallace and Dadda
// schemes prescribe; the cell itself is a plain two-level XOR/majority form.
// Combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic co
);
  assign s  = x ^ y ^ z;
  assign co = (x & y) | (z & (x ^ y));
endmodule
