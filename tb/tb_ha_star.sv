// tb_ha_star: exhaustive check of the HA* cell. For each of the four input
// pairs it compares c and s with the expected table (c = p|q, s = p^q) and
// checks the defining identity -2c + s = -p - q.
module tb_ha_star;
  logic p, q, c, s;
  int checks = 0, failures = 0;

  ha_star dut (.p(p), .q(q), .c(c), .s(s));

  // expected {c,s} for pq = 00, 01, 10, 11
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b11, 2'b11, 2'b10};

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {p, q} = 2'(v);
      #1;
      checks++;
      if ({c, s} !== EXP[v]) begin
        failures++;
        $display("FAIL p=%b q=%b: c=%b s=%b, expected %b", p, q, c, s, EXP[v]);
      end
      checks++;
      if (-2 * int'(c) + int'(s) != -int'(p) - int'(q)) begin
        failures++;
        $display("FAIL value identity p=%b q=%b", p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
