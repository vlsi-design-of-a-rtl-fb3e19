// half_adder: ordinary half adder of two positively weighted bits.
// s = a ^ b (weight 1), c = a & b (weight 2), so 2c + s = a + b.
// Purely combinational. Used as the "HA" cell inside the NR4SD digit cells.
module half_adder (
  input  logic a,
  input  logic b,
  output logic c,
  output logic s
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
