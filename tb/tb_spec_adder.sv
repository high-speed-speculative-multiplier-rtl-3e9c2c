// tb_spec_adder: checks the 32-bit speculative adder with 8-bit blocks.
// The flag must be high exactly when the sum differs from the true sum
// (mod 2^32). Random operands are mixed with operands built to hold a long
// propagate run starting at a random place, so both flagged and unflagged
// additions are seen; each must occur.
module tb_spec_adder;
  int checks = 0;
  int failures = 0;
  int n_err = 0;
  int n_ok = 0;
  logic [31:0] a, b, s, ref_s;
  logic e;

  spec_adder #(.W(32), .BLK(8)) dut (.a(a), .b(b), .sum(s), .err(e));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      a = $urandom;
      if (i % 2 == 0) b = $urandom;
      else begin
        // b = ~a over a run of 8..24 bits gives a long propagate chain
        logic [31:0] mask;
        int lo, len;
        lo   = $urandom_range(0, 20);
        len  = $urandom_range(8, 24);
        mask = ((32'd1 << len) - 1) << lo;
        b    = (~a & mask) | ($urandom & ~mask);
      end
      if (i == 0) begin a = 32'h0000_01ff; b = 32'h0000_ff01; end
      #1;
      ref_s = a + b;
      checks++;
      if (e != (s != ref_s)) begin
        failures++;
        $display("FAIL %h + %h: sum %h (true %h) err %0b", a, b, s, ref_s, e);
      end
      if (e) n_err++; else n_ok++;
    end
    checks++;
    if (n_err == 0 || n_ok == 0) begin
      failures++;
      $display("FAIL flagged %0d, unflagged %0d", n_err, n_ok);
    end
    $display("flagged %0d unflagged %0d", n_err, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
