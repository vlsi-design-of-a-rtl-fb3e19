// pp_generator: radix-4 partial product generator.
//
// For every digit j of the recoded multiplier it selects 0, a or 2*a
// (a is the N-bit two's complement multiplicand, sign-extended to N+1 bits)
// and inverts the selection when the digit is negative. The row pp[j] is
// therefore digit_j*a - neg[j] as an (N+1)-bit two's complement number, and
// neg[j] is the +1 that completes the negation; the adder tree adds it at
// column 2j. The selection works directly on the one-hot encoding signals,
// so no decoding happens here. The row format is this design's choice.
//
// Interface: a, enc in; pp rows and neg bits out. Timing: combinational,
// one 2:1 select and one XOR per bit.
module pp_generator
  import nr4sd_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0]              a,
  input  digit_enc_t [N/2-1:0]      enc,
  output logic [N/2-1:0][N:0]       pp,
  output logic [N/2-1:0]            neg
);
  localparam int K = N / 2;

  logic [N:0] a1, a2;  // a and 2a in N+1 bits
  assign a1 = {a[N-1], a};
  assign a2 = {a, 1'b0};

  always_comb begin
    for (int j = 0; j < K; j++) begin
      logic one, two;
      one    = enc[j].one_p | enc[j].one_n;
      two    = enc[j].two_p | enc[j].two_n;
      neg[j] = enc[j].one_n | enc[j].two_n;
      pp[j]  = ({(N+1){one}} & a1) | ({(N+1){two}} & a2);
      pp[j]  = pp[j] ^ {(N+1){neg[j]}};
    end
  end
endmodule
