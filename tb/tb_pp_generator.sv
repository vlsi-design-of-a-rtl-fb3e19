// tb_pp_generator: checks every partial product row for all 256 values of
// the multiplicand and all five digit values (each digit position gets a
// different digit, rotated). Row j read as a signed (N+1)-bit number, plus
// neg[j], must equal digit_j * a; neg[j] must be set exactly for negative
// digits.
module tb_pp_generator;
  import nr4sd_pkg::*;
  localparam int N = 8, K = N / 2;
  int checks = 0, failures = 0;

  logic [N-1:0]         a;
  digit_enc_t [K-1:0]   enc;
  logic [K-1:0][N:0]    pp;
  logic [K-1:0]         neg;
  int                   dig [K];

  pp_generator #(.N(N)) dut (.a(a), .enc(enc), .pp(pp), .neg(neg));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int r = 0; r < 5; r++) begin
        a = N'(v);
        for (int j = 0; j < K; j++) begin
          dig[j] = ((r + j) % 5) - 2;
          enc[j] = enc_of(dig[j]);
        end
        #1;
        for (int j = 0; j < K; j++) begin
          checks++;
          if (int'($signed(pp[j])) + int'(neg[j]) != dig[j] * int'($signed(a))) begin
            failures++;
            $display("FAIL a=%0d digit=%0d row=%b neg=%b", $signed(a), dig[j], pp[j], neg[j]);
          end
          checks++;
          if (neg[j] != (dig[j] < 0)) begin
            failures++;
            $display("FAIL neg for digit %0d", dig[j]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
