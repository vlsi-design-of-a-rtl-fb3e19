// nr4sd_pkg: types shared by the radix-4 recoders, the partial product
// generator and the multiplier.
//
// A radix-4 digit of the multiplier lies in {-2,-1,0,+1,+2}. It is carried
// between blocks as four one-hot select lines (all zero for digit 0), the
// "encoding signals" one+/one-/two+/two-. An NR4SD- digit only ever uses
// one+, one- and two-; an NR4SD+ digit only one+, one- and two+; the most
// significant digit, in Modified Booth form, may use all four.
package nr4sd_pkg;

  // Which non-redundant radix-4 signed-digit form the recoder produces.
  typedef enum logic {
    NR4SD_MINUS = 1'b0,  // digits in {-2,-1,0,+1}
    NR4SD_PLUS  = 1'b1   // digits in {-1,0,+1,+2}
  } nr4sd_mode_e;

  // One-hot digit encoding; all zero encodes digit 0.
  typedef struct packed {
    logic two_n;  // digit -2
    logic one_n;  // digit -1
    logic one_p;  // digit +1
    logic two_p;  // digit +2
  } digit_enc_t;

  // Encoding of an integer digit value in -2..+2.
  function automatic digit_enc_t enc_of(int v);
    digit_enc_t e;
    e = '0;
    e.two_n = (v == -2);
    e.one_n = (v == -1);
    e.one_p = (v == 1);
    e.two_p = (v == 2);
    return e;
  endfunction

  // Integer value of an encoding (for checks; assumes at most one line set).
  function automatic int value_of(digit_enc_t e);
    return (e.two_p ? 2 : 0) + (e.one_p ? 1 : 0) - (e.one_n ? 1 : 0) - (e.two_n ? 2 : 0);
  endfunction

endpackage
