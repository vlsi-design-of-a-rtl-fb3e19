// nr4sd_minus_digit: one digit cell of the two's complement to NR4SD- recoder.
//
// Bit pair (b_2j+1, b_2j) plus the incoming carry c_2j becomes one radix-4
// digit  b_j = -2*n_2j+1 + n_2j  in {-2,-1,0,+1}  and an outgoing carry
// c_2j+2 of weight 4, so that 2*b_2j+1 + b_2j + c_2j = 4*c_2j+2 + b_j.
// An ordinary half adder adds b_2j and c_2j (sum n_2j, weight +1); the HA*
// cell then adds b_2j+1 and that carry, giving n_2j+1 (weight -2) and
// c_2j+2 = b_2j+1 | c_2j+1. This structure follows the design's digit-level
// drawing. The one-hot encoding signals one+/one-/two- are decoded from
// (n_2j+1, n_2j); that decode is derived from the digit equation.
// Purely combinational; the carry ripples from cell to cell.
module nr4sd_minus_digit
  import nr4sd_pkg::*;
(
  input  logic       b_lo,   // b_2j
  input  logic       b_hi,   // b_2j+1
  input  logic       c_in,   // c_2j
  output logic       c_out,  // c_2j+2
  output logic       n_lo,   // n_2j   (weight +1)
  output logic       n_hi,   // n_2j+1 (weight -2)
  output digit_enc_t enc
);
  logic c_mid;  // c_2j+1

  half_adder u_ha (.a(b_lo), .b(c_in), .c(c_mid), .s(n_lo));
  ha_star    u_hs (.p(b_hi), .q(c_mid), .c(c_out), .s(n_hi));

  always_comb begin
    enc       = '0;
    enc.one_p = n_lo & ~n_hi;
    enc.one_n = n_lo &  n_hi;
    enc.two_n = ~n_lo & n_hi;
  end
endmodule
