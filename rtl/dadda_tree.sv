// dadda_tree: Dadda reduction of the radix-4 partial products to two rows.
//
// Dot matrix. Row j (digit j) is N+1 bits wide and starts at column 2j.
// Its low N bits are placed as they are; its sign bit pp[j][N] is placed
// inverted at column 2j+N; neg[j] is placed at column 2j. Inverting a sign
// bit s turns -s*2^m into (1-s)*2^m - 2^m, so the constant
//     CORR = -sum_j 2^(N+2j)  (mod 2^2N)
// is added once, as extra dots, and no row needs sign-extension bits.
// Everything is taken modulo 2^2N (a signed NxN product fits in 2N bits).
//
// Reduction. Dadda's limits are d1 = 2, d(i+1) = floor(1.5*d(i)). Starting
// from the largest limit below the tallest column, each stage walks the
// columns from the least significant one and places full adders (three dots
// to a sum here and a carry in the next column) and, for an excess of one,
// a half adder, only until the column - counting the carries that arrive
// from the column below in the same stage - is no taller than the limit.
// After the stage with limit 2 every column holds at most two dots, which
// are returned as row0 and row1. The dot positions and the stage schedule
// are fixed by N alone, so the loops below unroll into a fixed adder array.
// The Dadda scheme is what the design names; the sign handling is this
// design's choice.
//
// Interface: pp, neg in; row0, row1 out with row0 + row1 = sum of all
// partial products (mod 2^2N). Timing: combinational, one full-adder delay
// per stage (3 stages for N = 8).
module dadda_tree #(
  parameter int N = 8
) (
  input  logic [N/2-1:0][N:0] pp,
  input  logic [N/2-1:0]      neg,
  output logic [2*N-1:0]      row0,
  output logic [2*N-1:0]      row1
);
  localparam int K = N / 2;
  localparam int W = 2 * N;

  function automatic logic [W-1:0] corr_const();
    logic [W-1:0] v;
    v = '0;
    for (int j = 0; j < K; j++) v = v - (W'(1) << (N + 2*j));
    return v;
  endfunction
  localparam logic [W-1:0] CORR = corr_const();

  // Height of the initial dot matrix's tallest column.
  function automatic int max_height();
    int m, h;
    m = 0;
    for (int c = 0; c < W; c++) begin
      h = int'(CORR[c]);
      for (int j = 0; j < K; j++) begin
        if (c >= 2*j && c <= 2*j + N) h++;
        if (c == 2*j) h++;
      end
      if (h > m) m = h;
    end
    return m;
  endfunction
  localparam int HMAX = max_height();

  // Dadda limit of stage s (s = 0 is the last stage, limit 2).
  function automatic int dadda_limit(int s);
    int d;
    d = 2;
    for (int i = 0; i < s; i++) d = (d * 3) / 2;
    return d;
  endfunction

  // Number of stages: how many limits lie below the tallest column.
  function automatic int num_stages();
    int n;
    n = 0;
    while (dadda_limit(n) < HMAX) n++;
    return n;
  endfunction
  localparam int NST = num_stages();

  logic [W-1:0][HMAX-1:0] mat;   // initial dot matrix, column-major
  int                     h0 [W];

  always_comb begin
    for (int c = 0; c < W; c++) begin
      mat[c] = '0;
      h0[c]  = 0;
    end
    for (int j = 0; j < K; j++) begin
      for (int i = 0; i < N; i++) begin
        mat[2*j+i][h0[2*j+i]] = pp[j][i];
        h0[2*j+i]++;
      end
      mat[2*j+N][h0[2*j+N]] = ~pp[j][N];
      h0[2*j+N]++;
      mat[2*j][h0[2*j]] = neg[j];
      h0[2*j]++;
    end
    for (int c = 0; c < W; c++) begin
      if (CORR[c]) begin
        mat[c][h0[c]] = 1'b1;
        h0[c]++;
      end
    end
  end

  logic [W-1:0][HMAX-1:0] cur, nxt;
  int                     ch [W];
  int                     nh [W];

  always_comb begin
    int   d, idx, ex;
    logic x, y, z;
    d = 2; idx = 0; ex = 0;
    x = 1'b0; y = 1'b0; z = 1'b0;
    row0 = '0;
    row1 = '0;
    cur = mat;
    for (int c = 0; c < W; c++) ch[c] = h0[c];
    for (int s = NST - 1; s >= 0; s--) begin
      d = dadda_limit(s);
      nxt = '0;
      for (int c = 0; c < W; c++) nh[c] = 0;
      for (int c = 0; c < W; c++) begin
        idx = 0;
        ex  = ch[c] + nh[c] - d;
        for (int t = 0; t < HMAX; t++) begin
          if (ex >= 2) begin
            // full adder
            x = cur[c][idx]; y = cur[c][idx+1]; z = cur[c][idx+2];
            idx += 3;
            nxt[c][nh[c]] = x ^ y ^ z;
            nh[c]++;
            if (c + 1 < W) begin
              nxt[c+1][nh[c+1]] = (x & y) | (x & z) | (y & z);
              nh[c+1]++;
            end
            ex -= 2;
          end else if (ex == 1) begin
            // half adder
            x = cur[c][idx]; y = cur[c][idx+1];
            idx += 2;
            nxt[c][nh[c]] = x ^ y;
            nh[c]++;
            if (c + 1 < W) begin
              nxt[c+1][nh[c+1]] = x & y;
              nh[c+1]++;
            end
            ex -= 1;
          end
        end
        // dots not consumed by an adder pass straight to the next stage
        for (int i = 0; i < HMAX; i++) begin
          if (i >= idx && i < ch[c]) begin
            nxt[c][nh[c]] = cur[c][i];
            nh[c]++;
          end
        end
      end
      cur = nxt;
      for (int c = 0; c < W; c++) ch[c] = nh[c];
    end
    for (int c = 0; c < W; c++) begin
      row0[c] = (ch[c] > 0) ? cur[c][0] : 1'b0;
      row1[c] = (ch[c] > 1) ? cur[c][1] : 1'b0;
    end
  end

  initial assert (N >= 2 && N % 2 == 0)
    else $error("dadda_tree: N must be even and at least 2");
endmodule
