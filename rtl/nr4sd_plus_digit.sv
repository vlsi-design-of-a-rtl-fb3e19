// nr4sd_plus_digit: one digit cell of the two's complement to NR4SD+ recoder.
//
// Bit pair (b_2j+1, b_2j) plus the incoming carry c_2j becomes one radix-4
// digit  b_j = 2*n_2j+1 - n_2j  in {-1,0,+1,+2}  and an outgoing carry
// c_2j+2 of weight 4, so that 2*b_2j+1 + b_2j + c_2j = 4*c_2j+2 + b_j.
// The HA* cell adds b_2j and c_2j, giving n_2j (weight -1) and
// c_2j+1 = b_2j | c_2j (weight +2); an ordinary half adder then adds b_2j+1
// and c_2j+1, giving n_2j+1 (weight +2) and c_2j+2. This structure follows
// the design's digit-level drawing. The one-hot encoding signals
// one+/one-/two+ are decoded from (n_2j+1, n_2j), derived from the digit
// equation. Purely combinational; the carry ripples from cell to cell.
module nr4sd_plus_digit
  import nr4sd_pkg::*;
(
  input  logic       b_lo,   // b_2j
  input  logic       b_hi,   // b_2j+1
  input  logic       c_in,   // c_2j
  output logic       c_out,  // c_2j+2
  output logic       n_lo,   // n_2j   (weight -1)
  output logic       n_hi,   // n_2j+1 (weight +2)
  output digit_enc_t enc
);
  logic c_mid;  // c_2j+1

  ha_star    u_hs (.p(b_lo), .q(c_in), .c(c_mid), .s(n_lo));
  half_adder u_ha (.a(b_hi), .b(c_mid), .c(c_out), .s(n_hi));

  always_comb begin
    enc       = '0;
    enc.one_p = n_lo &  n_hi;
    enc.one_n = n_lo & ~n_hi;
    enc.two_p = ~n_lo & n_hi;
  end
endmodule
