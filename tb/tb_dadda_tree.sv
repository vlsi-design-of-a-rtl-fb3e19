// tb_dadda_tree: drives random partial product rows and neg bits into the
// Dadda tree at N = 8 (default) and N = 16 and checks that the two output
// rows add up to the weighted sum of the rows (each row a signed (N+1)-bit
// number at weight 4^j, plus neg[j] at weight 4^j), modulo 2^2N. Corner
// rows (all zeros, all ones, only sign bits) are included.
module tb_dadda_tree;
  int checks = 0, failures = 0;

  logic [3:0][8:0]   pp8;
  logic [3:0]        neg8;
  logic [15:0]       r0_8, r1_8;
  logic [7:0][16:0]  pp16;
  logic [7:0]        neg16;
  logic [31:0]       r0_16, r1_16;

  dadda_tree #(.N(8))  u8  (.pp(pp8),  .neg(neg8),  .row0(r0_8),  .row1(r1_8));
  dadda_tree #(.N(16)) u16 (.pp(pp16), .neg(neg16), .row0(r0_16), .row1(r1_16));

  function automatic logic [15:0] ref8(logic [3:0][8:0] p, logic [3:0] n);
    logic signed [31:0] s;
    s = 0;
    for (int j = 0; j < 4; j++) s += ($signed({{23{p[j][8]}}, p[j]}) + n[j]) <<< (2*j);
    return s[15:0];
  endfunction

  function automatic logic [31:0] ref16(logic [7:0][16:0] p, logic [7:0] n);
    logic signed [63:0] s;
    s = 0;
    for (int j = 0; j < 8; j++) s += ($signed({{47{p[j][16]}}, p[j]}) + n[j]) <<< (2*j);
    return s[31:0];
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      case (t)
        0: begin pp8 = '0; neg8 = '0; pp16 = '0; neg16 = '0; end
        1: begin pp8 = '1; neg8 = '1; pp16 = '1; neg16 = '1; end
        2: begin
          for (int j = 0; j < 4; j++) pp8[j] = 9'h100;
          for (int j = 0; j < 8; j++) pp16[j] = 17'h10000;
          neg8 = '0; neg16 = '0;
        end
        default: begin
          for (int j = 0; j < 4; j++) pp8[j] = 9'($urandom);
          for (int j = 0; j < 8; j++) pp16[j] = 17'($urandom);
          neg8 = 4'($urandom); neg16 = 8'($urandom);
        end
      endcase
      #1;
      checks++;
      if (16'(r0_8 + r1_8) != ref8(pp8, neg8)) begin
        failures++;
        $display("FAIL N=8 pp=%h neg=%b: %h + %h != %h", pp8, neg8, r0_8, r1_8, ref8(pp8, neg8));
      end
      checks++;
      if (32'(r0_16 + r1_16) != ref16(pp16, neg16)) begin
        failures++;
        $display("FAIL N=16 pp=%h neg=%b", pp16, neg16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
