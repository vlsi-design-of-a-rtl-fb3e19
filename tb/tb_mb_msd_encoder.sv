// tb_mb_msd_encoder: exhaustive check of the Modified Booth top digit.
// For all eight (b_2k-1, b_2k-2, c_2k-2) the one-hot output must encode
// -2*b_2k-1 + b_2k-2 + c_2k-2 and have at most one line set.
module tb_mb_msd_encoder;
  import nr4sd_pkg::*;
  logic       b_hi, b_lo, c_in;
  digit_enc_t enc;
  int checks = 0, failures = 0;

  mb_msd_encoder dut (.b_hi(b_hi), .b_lo(b_lo), .c_in(c_in), .enc(enc));

  localparam int EXP [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {b_hi, b_lo, c_in} = 3'(v);
      #1;
      checks++;
      if (enc != enc_of(EXP[v])) begin
        failures++;
        $display("FAIL b=%b%b c=%b: enc=%b expected digit %0d", b_hi, b_lo, c_in, enc, EXP[v]);
      end
      checks++;
      if ($countones(enc) > 1) begin
        failures++;
        $display("FAIL: encoding %b not one-hot", enc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
