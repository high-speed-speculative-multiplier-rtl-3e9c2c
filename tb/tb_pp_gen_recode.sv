// tb_pp_gen_recode: checks partial-product generation and recoding for the
// 16 x 16 configuration (recoded columns 8 .. 22). For random and corner
// operands: the weighted sum of all kept bits and all A terms must equal
// a * b; in a recoded column the h-th pair (i ascending, i < k-i) must give
// A = a_i b_j AND a_j b_i and O = a_i b_j OR a_j b_i; slots above each
// column's counts must be zero.
module tb_pp_gen_recode;
  import spec_mult_pkg::*;
  int checks = 0;
  int failures = 0;

  localparam int N = 16, LO = 8, HI = 22, NCOL = 2 * N - 1;
  localparam int KH = max_kept(N, LO, HI);
  localparam int AH = max_a(N, LO, HI);

  logic [N-1:0] a, b;
  logic [NCOL-1:0][KH-1:0] kept;
  logic [NCOL-1:0][AH-1:0] acol;

  pp_gen_recode dut (.a(a), .b(b), .kept(kept), .acol(acol));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (KH != 8 || AH != 8) begin
      failures++;
      $display("FAIL matrix heights kept %0d, A %0d", KH, AH);
    end
    for (int it = 0; it < 2000; it++) begin
      longint tot;
      int bad;
      case (it)
        0: begin a = '1; b = '1; end
        1: begin a = '0; b = '1; end
        2: begin a = 16'h8001; b = 16'hffff; end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      #1;
      tot = 0;
      bad = 0;
      for (int k = 0; k < NCOL; k++) begin
        int p;
        for (int h = 0; h < KH; h++) tot += longint'(kept[k][h]) << k;
        for (int h = 0; h < AH; h++) tot += longint'(acol[k][h]) << k;
        for (int h = kept_count(k, N, LO, HI); h < KH; h++) if (kept[k][h]) bad++;
        for (int h = a_count(k, N, LO, HI); h < AH; h++) if (acol[k][h]) bad++;
        if (k >= LO && k <= HI) begin
          p = 0;
          for (int i = 0; i < N; i++) begin
            int j;
            j = k - i;
            if (j > i && j < N) begin
              logic x, y;
              x = a[i] & b[j];
              y = a[j] & b[i];
              if (acol[k][p] != (x & y) || kept[k][p] != (x | y)) bad++;
              p++;
            end
          end
        end
      end
      checks++;
      if (tot != longint'(a) * longint'(b)) begin
        failures++;
        $display("FAIL %h * %h: matrix sums to %h", a, b, tot);
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL %h * %h: %0d recoded terms wrong", a, b, bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
