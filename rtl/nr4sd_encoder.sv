// nr4sd_encoder: word-level recoder from N-bit two's complement to N/2
// radix-4 signed digits (NR4SD- or NR4SD+, chosen by MODE).
//
// The N/2-1 low bit pairs each go through an NR4SD digit cell; the cells
// form a ripple chain from the least significant end, with carry c_0 = 0
// and the carry of one cell entering the next. The top bit pair, which
// holds the sign, and the last carry form the most significant digit in
// Modified Booth form (range -2..+2). So
//     b (signed) = sum_j digit_j * 4^j,
// with digits j < N/2-1 in {-2,-1,0,+1} (NR4SD-) or {-1,0,+1,+2} (NR4SD+).
// The chain and the Booth top digit follow the design's word-level
// drawings. In the intended use this recoding is done once, off line, for
// constant coefficients, and the digits are stored; here it is a
// combinational block so that the same logic serves both purposes.
//
// Interface: b in, enc[j] out (one-hot per digit, see nr4sd_pkg).
// Timing: combinational, a ripple through N/2-1 cells of two gates each.
module nr4sd_encoder
  import nr4sd_pkg::*;
#(
  parameter int          N    = 8,            // input width, even
  parameter nr4sd_mode_e MODE = NR4SD_MINUS
) (
  input  logic [N-1:0]              b,
  output digit_enc_t [N/2-1:0]      enc
);
  localparam int K = N / 2;  // number of digits

  logic [K-1:0] c;  // c[j] = carry c_2j into digit j
  assign c[0] = 1'b0;

  // The cells' n outputs (the NR4SD bit form) are not needed here: the
  // one-hot encodings carry the same information.
  for (genvar j = 0; j < K - 1; j++) begin : g_cell
    if (MODE == NR4SD_MINUS) begin : g_minus
      nr4sd_minus_digit u_cell (
        .b_lo (b[2*j]), .b_hi (b[2*j+1]), .c_in (c[j]),
        .c_out(c[j+1]), .n_lo (),     .n_hi (), .enc (enc[j])
      );
    end else begin : g_plus
      nr4sd_plus_digit u_cell (
        .b_lo (b[2*j]), .b_hi (b[2*j+1]), .c_in (c[j]),
        .c_out(c[j+1]), .n_lo (),     .n_hi (), .enc (enc[j])
      );
    end
  end

  mb_msd_encoder u_msd (
    .b_hi(b[N-1]), .b_lo(b[N-2]), .c_in(c[K-1]), .enc(enc[K-1])
  );

  initial assert (N >= 2 && N % 2 == 0)
    else $error("nr4sd_encoder: N must be even and at least 2");
endmodule
