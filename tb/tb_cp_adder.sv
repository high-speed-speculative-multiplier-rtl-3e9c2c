// tb_cp_adder: random and corner-case check of the exact adder (32 bits).
module tb_cp_adder;
  int checks = 0;
  int failures = 0;
  logic [31:0] a, b, s;

  cp_adder #(.W(32)) dut (.a(a), .b(b), .sum(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: begin a = '1; b = 32'd1; end
        1: begin a = 32'h7fff_ffff; b = 32'h7fff_ffff; end
        2: begin a = '0; b = '0; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      #1;
      checks++;
      if (s != 32'(64'(a) + 64'(b))) begin
        failures++;
        $display("FAIL %h + %h = %h", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
