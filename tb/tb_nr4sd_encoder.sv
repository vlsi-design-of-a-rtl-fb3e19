// tb_nr4sd_encoder: exhaustive check of the word-level recoder in both
// forms. For every 8-bit input (and every 10-bit input of a second pair of
// instances) it checks that the digits, weighted 4^j, add up to the
// two's complement value, that each encoding is one-hot or zero, and that
// every digit but the top one lies in the form's digit set: {-2..+1} for
// NR4SD-, {-1..+2} for NR4SD+ (the top digit may be -2..+2).
module tb_nr4sd_encoder;
  import nr4sd_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0] b8;
  logic [9:0] b10;
  digit_enc_t [3:0] em8, ep8;
  digit_enc_t [4:0] em10, ep10;

  nr4sd_encoder #(.N(8),  .MODE(NR4SD_MINUS)) u_m8  (.b(b8),  .enc(em8));
  nr4sd_encoder #(.N(8),  .MODE(NR4SD_PLUS))  u_p8  (.b(b8),  .enc(ep8));
  nr4sd_encoder #(.N(10), .MODE(NR4SD_MINUS)) u_m10 (.b(b10), .enc(em10));
  nr4sd_encoder #(.N(10), .MODE(NR4SD_PLUS))  u_p10 (.b(b10), .enc(ep10));

  // counts of each top digit value seen, to show the Booth digit is exercised
  int msd_seen [5];

  task automatic check_word(input int k, input int val, input digit_enc_t enc [],
                            input int lo, input int hi, input string tag);
    int sum, w, d;
    sum = 0; w = 1;
    for (int j = 0; j < k; j++) begin
      d = value_of(enc[j]);
      checks++;
      if ($countones(enc[j]) > 1) begin
        failures++;
        $display("FAIL %s b=%0d digit %0d not one-hot: %b", tag, val, j, enc[j]);
      end
      if (j < k - 1) begin
        checks++;
        if (d < lo || d > hi) begin
          failures++;
          $display("FAIL %s b=%0d digit %0d = %0d out of range", tag, val, j, d);
        end
      end else begin
        msd_seen[d + 2]++;
      end
      sum += d * w;
      w *= 4;
    end
    checks++;
    if (sum != val) begin
      failures++;
      $display("FAIL %s b=%0d recoded value %0d", tag, val, sum);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    digit_enc_t e [];
    for (int v = 0; v < 256; v++) begin
      b8 = 8'(v);
      #1;
      e = new[4];
      for (int j = 0; j < 4; j++) e[j] = em8[j];
      check_word(4, int'($signed(b8)), e, -2, 1, "N8 minus");
      for (int j = 0; j < 4; j++) e[j] = ep8[j];
      check_word(4, int'($signed(b8)), e, -1, 2, "N8 plus");
    end
    for (int v = 0; v < 1024; v++) begin
      b10 = 10'(v);
      #1;
      e = new[5];
      for (int j = 0; j < 5; j++) e[j] = em10[j];
      check_word(5, int'($signed(b10)), e, -2, 1, "N10 minus");
      for (int j = 0; j < 5; j++) e[j] = ep10[j];
      check_word(5, int'($signed(b10)), e, -1, 2, "N10 plus");
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (msd_seen[i] == 0) begin
        failures++;
        $display("FAIL top digit %0d never produced", i - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
