// tb_pre_encoded_dadda_top_full: runs the multiplier exactly as delivered
// (all parameters at their defaults: 8x8, NR4SD-). It resets it, applies
// the reference vector x = 26, y = 10 and expects out = 260 one rising edge
// later, then multiplies all 65536 operand pairs, one per cycle, and checks
// each registered product against x*y of the cycle before.
module tb_pre_encoded_dadda_top_full;
  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  x, y;
  logic [15:0] out;

  pre_encoded_dadda_top dut (.clk(clk), .rst(rst), .x(x), .y(y), .out(out));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: x=%0d y=%0d out=%0d", what, $signed(x), $signed(y),
                                  $signed(out));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; x = '0; y = '0;
    repeat (2) @(posedge clk);
    #1 check(out == 0, "reset");
    @(negedge clk);
    rst = 1'b0; x = 8'd26; y = 8'd10;
    @(posedge clk);
    #1 check(out == 16'd260, "26 x 10 after one edge");
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      {x, y} = 16'(v);
      @(posedge clk);
      #1 check(out == 16'($signed(x) * $signed(y)), "product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
