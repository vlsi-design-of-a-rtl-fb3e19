// ha_star: the "HA*" cell of the NR4SD recoders.
//
// It adds two bits of equal weight but returns them as a carry of weight -2
// and a sum of weight +1 (or, with every sign flipped, a carry of +2 and a
// sum of -1):  c = p | q,  s = p ^ q,  so -2c + s = -p - q.
// Unlike an ordinary half adder, the carry is set when either input is set;
// this is what keeps the recoded digit inside a non-redundant set.
// Purely combinational; the equations are the ones the design is based on.
module ha_star (
  input  logic p,
  input  logic q,
  output logic c,
  output logic s
);
  assign c = p | q;
  assign s = p ^ q;
endmodule
