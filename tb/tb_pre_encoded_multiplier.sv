// tb_pre_encoded_multiplier: exhaustive check of the multiplier core at
// N = 8: every multiplicand (256) against every vector of four digits in
// {-2..+2} (625), which covers the NR4SD-, NR4SD+ and Booth digit sets.
// The expected product a * sum_j digit_j*4^j is computed with integer
// arithmetic in the testbench, independently of the recoders.
module tb_pre_encoded_multiplier;
  import nr4sd_pkg::*;
  localparam int N = 8, K = N / 2;
  int checks = 0, failures = 0;

  logic [N-1:0]       a;
  digit_enc_t [K-1:0] enc;
  logic [2*N-1:0]     p;

  pre_encoded_multiplier #(.N(N)) dut (.a(a), .enc(enc), .p(p));

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bval, w, d, rem, expv;
    for (int dv = 0; dv < 625; dv++) begin
      bval = 0; w = 1; rem = dv;
      for (int j = 0; j < K; j++) begin
        d = (rem % 5) - 2;
        rem /= 5;
        enc[j] = enc_of(d);
        bval += d * w;
        w *= 4;
      end
      for (int v = 0; v < 256; v++) begin
        a = N'(v);
        #1;
        expv = int'($signed(a)) * bval;
        checks++;
        if (p != 16'(expv)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d: p=%0d expected %0d", $signed(a), bval,
                                      $signed(p), expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
