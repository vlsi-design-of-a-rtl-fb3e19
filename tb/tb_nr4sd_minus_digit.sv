// tb_nr4sd_minus_digit: exhaustive check of the NR4SD- digit cell: for all eight (b_2j+1, b_2j, c_2j) it compares the
// carry, n bits and digit with the recoding table (digit -2*n_2j+1 + n_2j),
// checks the radix-4 identity 2*b_2j+1 + b_2j + c_2j = 4*c_2j+2 + digit,
// the digit range, and that the one-hot encoding matches the digit.
module tb_nr4sd_minus_digit;
  import nr4sd_pkg::*;
  logic       b_lo, b_hi, c_in, c_out, n_lo, n_hi;
  digit_enc_t enc;
  int checks = 0, failures = 0;

  // digit for (b_2j+1, b_2j, c_2j) = 000 .. 111
  localparam int EXP_DIGIT [8] = '{0, 1, 1, -2, -2, -1, -1, 0};

  nr4sd_minus_digit dut (.b_lo(b_lo), .b_hi(b_hi), .c_in(c_in), .c_out(c_out),
                           .n_lo(n_lo), .n_hi(n_hi), .enc(enc));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: b=%b%b c=%b -> c_out=%b n=%b%b enc=%b", what, b_hi, b_lo, c_in,
               c_out, n_hi, n_lo, enc);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, exp_d, exp_c;
    for (int v = 0; v < 8; v++) begin
      {b_hi, b_lo, c_in} = 3'(v);
      #1;
      d = -2 * int'(n_hi) + int'(n_lo);
      // reference: the digit is the input value minus 4 times the carry
      exp_d = EXP_DIGIT[v];
      exp_c = (2 * int'(b_hi) + int'(b_lo) + int'(c_in) - exp_d) / 4;
      check(d == exp_d, "digit");
      check(int'(c_out) == exp_c, "carry");
      check(2 * int'(b_hi) + int'(b_lo) + int'(c_in) == 4 * int'(c_out) + d, "identity");
      check(d >= -2 && d <= 1, "range");
      check(enc == enc_of(d), "encoding");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
