// tb_corr_block: exhaustive check of the correction blocks for m = 4, 5, 6,
// 7 and 8. The flag must be high exactly when four or more inputs are high,
// and the counter output (2*C + S, computed here from its definition) plus
// twice the correction word must equal the number of ones. A (4:2) block
// must reduce to one bit that is the AND of its four inputs.
module tb_corr_block;
  import spec_mult_pkg::*;
  int checks = 0;
  int failures = 0;

  logic [3:0] x4; logic e4; logic [ew_width(4)-1:0] w4;
  logic [4:0] x5; logic e5; logic [ew_width(5)-1:0] w5;
  logic [5:0] x6; logic e6; logic [ew_width(6)-1:0] w6;
  logic [6:0] x7; logic e7; logic [ew_width(7)-1:0] w7;
  logic [7:0] x8; logic e8; logic [ew_width(8)-1:0] w8;

  corr_block #(.M(4)) u4 (.x(x4), .e(e4), .ew(w4));
  corr_block #(.M(5)) u5 (.x(x5), .e(e5), .ew(w5));
  corr_block #(.M(6)) u6 (.x(x6), .e(e6), .ew(w6));
  corr_block #(.M(7)) u7 (.x(x7), .e(e7), .ew(w7));
  corr_block #(.M(8)) u8 (.x(x8), .e(e8), .ew(w8));

  task automatic check(int m, int pat, logic e, int ew);
    int ones;
    int spec;
    ones = $countones(pat);
    spec = (ones >= 2 ? 2 : 0) + (ones % 2);
    checks++;
    if (e != (ones >= 4)) begin
      failures++;
      $display("FAIL m=%0d x=%b: E=%0b", m, pat, e);
    end
    checks++;
    if (spec + 2 * ew != ones) begin
      failures++;
      $display("FAIL m=%0d x=%b: 2C+S=%0d EW=%0d ones=%0d", m, pat, spec, 2 * ew, ones);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (ew_width(4) != 1) begin
      failures++;
      $display("FAIL (4:2) correction word is %0d bits", ew_width(4));
    end
    for (int p = 0; p < 256; p++) begin
      x4 = 4'(p); x5 = 5'(p); x6 = 6'(p); x7 = 7'(p); x8 = 8'(p);
      #1;
      if (p < 16) begin
        check(4, p, e4, int'(w4));
        checks++;
        if (w4[0] != &x4) begin
          failures++;
          $display("FAIL (4:2) correction bit is not AND4 for x=%b", x4);
        end
      end
      if (p < 32)  check(5, p, e5, int'(w5));
      if (p < 64)  check(6, p, e6, int'(w6));
      if (p < 128) check(7, p, e7, int'(w7));
      check(8, p, e8, int'(w8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
