// tb_pre_encoded_dadda_top: end-to-end test of the registered multiplier in
// both recoding forms (one instance at the defaults, NR4SD-, and one with
// MODE = NR4SD_PLUS), fed the same operands, plus a 16x16 instance.
//   1. Reset: out must be zero while rst is high.
//   2. The reference vector x = 26, y = 10 must give out = 260 one rising
//      edge after it is applied (one cycle of latency, no more, no less).
//   3. All 65536 signed operand pairs, one pair per cycle; each out is
//      compared with x*y of the previous cycle.
//   4. A 16x16 instance (NR4SD+) gets 20000 random and extreme pairs.
//   5. Reset in the middle of the stream clears out again.
// It also counts how often each mechanism of the design is exercised -
// every digit value in each form, the +-2a (shifted) and negated partial
// products, the Booth top digit at +-2, and reset - and counts a failure
// for any that never occurs.
module tb_pre_encoded_dadda_top;
  import nr4sd_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  x, y;
  logic [15:0] out_m, out_p;

  pre_encoded_dadda_top dut_m (.clk(clk), .rst(rst), .x(x), .y(y), .out(out_m));
  pre_encoded_dadda_top #(.MODE(NR4SD_PLUS)) dut_p (.clk(clk), .rst(rst), .x(x), .y(y), .out(out_p));

  // a wider instance (16x16, NR4SD+) fed random operands
  logic [15:0] x16, y16;
  logic [31:0] out16;
  pre_encoded_dadda_top #(.N(16), .MODE(NR4SD_PLUS)) dut_16 (.clk(clk), .rst(rst), .x(x16), .y(y16),
                                                            .out(out16));

  always #5 clk = ~clk;

  int seen_m [5], seen_p [5];  // digit values -2..+2 in the low digits
  int msd_two, resets, cycles;

  always @(negedge clk) begin
    for (int j = 0; j < 3; j++) begin
      seen_m[value_of(dut_m.y_enc[j]) + 2]++;
      seen_p[value_of(dut_p.y_enc[j]) + 2]++;
    end
    if (value_of(dut_m.y_enc[3]) == 2 || value_of(dut_m.y_enc[3]) == -2) msd_two++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: x=%0d y=%0d out_m=%0d out_p=%0d", what, $time,
                                  $signed(x), $signed(y), $signed(out_m), $signed(out_p));
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] expv;
    rst = 1'b1; x = '0; y = '0; x16 = '0; y16 = '0;
    repeat (3) @(posedge clk);
    #1;
    check(out_m == 0 && out_p == 0, "reset clears out");
    resets++;
    // reference vector, applied after reset is released
    @(negedge clk);
    rst = 1'b0; x = 8'b0001_1010; y = 8'b0000_1010;
    cycles = 0;
    do begin
      @(posedge clk); #1; cycles++;
    end while (out_m != 16'd260 && cycles < 5);
    check(cycles == 1, "latency of one clock edge");
    check(out_m == 16'b0000_0001_0000_0100 && out_p == 16'd260, "26 x 10 = 260");
    // every operand pair
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      {x, y} = 16'(v);
      expv = 16'($signed(x) * $signed(y));
      @(posedge clk); #1;
      check(out_m == expv, "NR4SD- product");
      check(out_p == expv, "NR4SD+ product");
    end
    // 16x16 instance, random operands plus the extreme values
    for (int v = 0; v < 20000; v++) begin
      logic [31:0] exp16;
      @(negedge clk);
      case (v)
        0:       {x16, y16} = {16'h8000, 16'h8000};
        1:       {x16, y16} = {16'h7fff, 16'h8000};
        2:       {x16, y16} = {16'hffff, 16'hffff};
        default: {x16, y16} = $urandom;
      endcase
      exp16 = 32'($signed(x16) * $signed(y16));
      @(posedge clk); #1;
      check(out16 == exp16, "16x16 product");
    end
    // reset in mid-stream
    @(negedge clk);
    x = 8'h7f; y = 8'h7f; rst = 1'b1;
    @(posedge clk); #1;
    check(out_m == 0 && out_p == 0, "reset in mid-stream");
    resets++;
    @(negedge clk); rst = 1'b0;
    @(posedge clk); #1;
    check(out_m == 16'd16129 && out_p == 16'd16129, "127 x 127 after reset");

    // mechanisms
    for (int i = 0; i < 5; i++) begin
      // NR4SD- low digits never reach +2, NR4SD+ low digits never -2
      if (i == 4) check(seen_m[i] == 0, "NR4SD- digit +2 absent");
      else begin
        check(seen_m[i] > 0, "NR4SD- digit value seen");
        $display("NR4SD- low digit %0d seen %0d times", i - 2, seen_m[i]);
      end
      if (i == 0) check(seen_p[i] == 0, "NR4SD+ digit -2 absent");
      else begin
        check(seen_p[i] > 0, "NR4SD+ digit value seen");
        $display("NR4SD+ low digit %0d seen %0d times", i - 2, seen_p[i]);
      end
    end
    $display("Booth top digit +-2 seen %0d times; resets %0d", msd_two, resets);
    check(msd_two > 0, "Booth top digit +-2");
    check(resets == 2, "reset exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
