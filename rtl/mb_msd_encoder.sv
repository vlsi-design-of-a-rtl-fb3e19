// mb_msd_encoder: most significant digit of the NR4SD recoders.
//
// The top bit pair of the two's complement input (b_2k-1 is the sign bit)
// plus the carry c_2k-2 from the last NR4SD cell form one Modified Booth
// digit  -2*b_2k-1 + b_2k-2 + c_2k-2  in {-2,-1,0,+1,+2}. No carry leaves
// this cell: the sign weight absorbs it, which is what makes the recoded
// number equal to the two's complement value. Output is the one-hot digit
// encoding. The input signs follow the design's word-level drawings; the
// decode logic is derived from the digit value. Purely combinational.
module mb_msd_encoder
  import nr4sd_pkg::*;
(
  input  logic       b_hi,  // b_2k-1, sign bit
  input  logic       b_lo,  // b_2k-2
  input  logic       c_in,  // c_2k-2
  output digit_enc_t enc
);
  logic lo_two, lo_one;  // b_2k-2 + c_2k-2 equals 2 / equals 1

  assign lo_two = b_lo & c_in;
  assign lo_one = b_lo ^ c_in;

  always_comb begin
    enc.two_p = ~b_hi & lo_two;             // 0 + 2
    enc.one_p = ~b_hi & lo_one;             // 0 + 1
    enc.one_n =  b_hi & lo_one;             // -2 + 1
    enc.two_n =  b_hi & ~lo_one & ~lo_two;  // -2 + 0
  end
endmodule
