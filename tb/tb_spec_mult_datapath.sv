// tb_spec_mult_datapath: checks the combinational multiplier datapath at its
// default size (16 x 16, columns 8 .. 22 recoded, 8-bit adder blocks).
// Operands are uniform random, dense random (each bit high with
// probability 3/4, which makes counter errors common) and corner values.
// Checks: the exact product y is always a * b; when err is low the
// speculative product ys is a * b as well; err_cnt equals a reference that
// counts, per recoded column, the pairs whose both products are high and
// looks for four or more; err is err_cnt OR err_add. Counter errors, adder
// errors and error-free products must each occur.
module tb_spec_mult_datapath;
  int checks = 0;
  int failures = 0;
  int n_ok = 0, n_cnt = 0, n_add = 0, n_ys_wrong = 0;
  int n_uni = 0, n_uni_cnt = 0, n_uni_add = 0;  // uniform operands only
  logic uni;

  logic [15:0] a, b;
  logic [31:0] ys, y, p;
  logic err, err_cnt, err_add;

  spec_mult_datapath dut (
    .a(a), .b(b), .ys(ys), .err(err), .err_cnt(err_cnt), .err_add(err_add), .y(y));

  function automatic logic ref_err_cnt(logic [15:0] x, logic [15:0] z);
    for (int k = 8; k <= 22; k++) begin
      int ones;
      ones = 0;
      for (int i = 0; i < 16; i++)
        if (k - i > i && k - i < 16) ones += int'(x[i] & z[k-i] & x[k-i] & z[i]);
      if (ones >= 4) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic logic [15:0] dense();
    return 16'($urandom) | 16'($urandom);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("uniform operands: %0d, counter errors %0d, adder errors %0d",
             n_uni, n_uni_cnt, n_uni_add);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 20000; it++) begin
      uni = 1'b0;
      case (it)
        0: begin a = '1; b = '1; end
        1: begin a = '0; b = '0; end
        2: begin a = 16'hffff; b = 16'h0001; end
        default:
          if (it % 3 == 0) begin a = dense(); b = dense(); end
          else begin a = 16'($urandom); b = 16'($urandom); uni = 1'b1; end
      endcase
      #1;
      p = 32'(a) * 32'(b);
      checks++;
      if (y != p) begin
        failures++;
        $display("FAIL %h * %h: y = %h, expected %h", a, b, y, p);
      end
      checks++;
      if (!err && ys != p) begin
        failures++;
        $display("FAIL %h * %h: ys = %h unflagged, expected %h", a, b, ys, p);
      end
      checks++;
      if (err_cnt != ref_err_cnt(a, b)) begin
        failures++;
        $display("FAIL %h * %h: err_cnt = %0b", a, b, err_cnt);
      end
      checks++;
      if (err != (err_cnt | err_add)) begin
        failures++;
        $display("FAIL %h * %h: err = %0b", a, b, err);
      end
      if (!err) n_ok++;
      if (err_cnt) n_cnt++;
      if (err_add) n_add++;
      if (err && ys != p) n_ys_wrong++;
      if (uni) begin
        n_uni++;
        if (err_cnt) n_uni_cnt++;
        if (err_add) n_uni_add++;
      end
    end
    checks++;
    if (n_ok == 0 || n_cnt == 0 || n_add == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("error-free %0d, counter errors %0d, adder errors %0d, ys wrong %0d",
             n_ok, n_cnt, n_add, n_ys_wrong);
    $display("uniform operands: %0d, counter errors %0d, adder errors %0d",
             n_uni, n_uni_cnt, n_uni_add);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
