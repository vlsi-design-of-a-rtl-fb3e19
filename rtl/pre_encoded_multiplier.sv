// pre_encoded_multiplier: NxN signed multiplier whose multiplier operand
// arrives already recoded as N/2 radix-4 digits.
//
// Because the coefficient is recoded once, ahead of time (NR4SD- or NR4SD+
// digits, with a Modified Booth top digit), the multiplier itself contains
// no recoding logic: the one-hot digit encodings select 0, +-a or +-2a in
// the partial product generator, the N/2 rows are reduced to two by a
// Dadda tree and a final 2N-bit carry-propagate adder forms the product.
// Any digit vector in {-2..+2}^(N/2) is accepted, so both NR4SD forms work
// without a mode setting. The final adder is this design's choice (a plain
// adder, left to synthesis).
//
// Interface: a (two's complement), enc[j] (digit j, weight 4^j) in;
// p = a * sum_j digit_j*4^j (mod 2^2N) out. Timing: combinational.
module pre_encoded_multiplier
  import nr4sd_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0]          a,
  input  digit_enc_t [N/2-1:0]  enc,
  output logic [2*N-1:0]        p
);
  logic [N/2-1:0][N:0] pp;
  logic [N/2-1:0]      neg;
  logic [2*N-1:0]      row0, row1;

  pp_generator #(.N(N)) u_ppg (.a(a), .enc(enc), .pp(pp), .neg(neg));
  dadda_tree   #(.N(N)) u_tree (.pp(pp), .neg(neg), .row0(row0), .row1(row1));

  assign p = row0 + row1;
endmodule
