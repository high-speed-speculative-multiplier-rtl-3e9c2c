// tb_spec_counter: exhaustive check of (m:2) speculative counters for
// m = 2, 3, 4, 5 and 8. For every input pattern with at most three ones,
// 2*C + S must equal the number of ones. For every pattern, S must be the
// parity and C must be "two or more ones" (the counter's definition).
module tb_spec_counter;
  int checks = 0;
  int failures = 0;

  logic [1:0] x2; logic s2, c2;
  logic [2:0] x3; logic s3, c3;
  logic [3:0] x4; logic s4, c4;
  logic [4:0] x5; logic s5, c5;
  logic [7:0] x8; logic s8, c8;

  spec_counter #(.M(2)) u2 (.x(x2), .s(s2), .c(c2));
  spec_counter #(.M(3)) u3 (.x(x3), .s(s3), .c(c3));
  spec_counter #(.M(4)) u4 (.x(x4), .s(s4), .c(c4));
  spec_counter #(.M(5)) u5 (.x(x5), .s(s5), .c(c5));
  spec_counter #(.M(8)) u8 (.x(x8), .s(s8), .c(c8));

  task automatic check(int m, int pat, logic s, logic c);
    int ones;
    ones = $countones(pat);
    checks++;
    if (ones <= 3 && (2 * int'(c) + int'(s)) != ones) begin
      failures++;
      $display("FAIL m=%0d x=%b: 2C+S=%0d, ones=%0d", m, pat, 2 * c + s, ones);
    end
    checks++;
    if (s != ones[0] || c != (ones >= 2)) begin
      failures++;
      $display("FAIL m=%0d x=%b: S=%0b C=%0b", m, pat, s, c);
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
    for (int p = 0; p < 256; p++) begin
      x2 = 2'(p); x3 = 3'(p); x4 = 4'(p); x5 = 5'(p); x8 = 8'(p);
      #1;
      if (p < 4)  check(2, p, s2, c2);
      if (p < 8)  check(3, p, s3, c3);
      if (p < 16) check(4, p, s4, c4);
      if (p < 32) check(5, p, s5, c5);
      check(8, p, s8, c8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
