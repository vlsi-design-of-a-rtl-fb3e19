// pre_encoded_dadda_top: registered NxN two's complement multiplier built
// from an NR4SD recoder and a Dadda-tree multiplier core (N = 8 by default).
//
// y is recoded into N/2 non-redundant radix-4 signed digits (NR4SD- by
// default, NR4SD+ with MODE = NR4SD_PLUS), which halves the number of
// partial products; x times each digit is formed, the rows are reduced by
// a Dadda tree and added, and the product is loaded into the output
// register. For constant coefficients the recoder would run off line and
// the core (pre_encoded_multiplier) would read stored digits; the recoder
// is kept in front of the core here so that the port list matches the
// reference design's plain binary x, y and out.
//
// Interface: clk, rst (synchronous, active high: clears out), x, y in;
// out = x*y out. Timing: out is registered on the rising edge of clk, so it
// shows the product of the x and y present one edge earlier; there is no
// input register. Port names, the 8x8 size, the output register with
// synchronous reset and the rising edge follow the reference results;
// reset polarity and the choice of y as the recoded operand are this
// design's reading.
module pre_encoded_dadda_top
  import nr4sd_pkg::*;
#(
  parameter int          N    = 8,
  parameter nr4sd_mode_e MODE = NR4SD_MINUS
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] out
);
  digit_enc_t [N/2-1:0] y_enc;
  logic [2*N-1:0]       prod;

  nr4sd_encoder #(.N(N), .MODE(MODE)) u_enc (.b(y), .enc(y_enc));
  pre_encoded_multiplier #(.N(N)) u_mul (.a(x), .enc(y_enc), .p(prod));

  always_ff @(posedge clk) begin
    if (rst) out <= '0;
    else     out <= prod;
  end
endmodule
