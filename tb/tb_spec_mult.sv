// tb_spec_mult: end-to-end test of the speculative multiplier at its default
// parameters (16 x 16). A stream of operand pairs (uniform random, dense
// random and corner values) is offered with a random valid pattern. A
// scoreboard checks every product against a * b, in order, and checks its
// latency: one edge after the operands were taken for a speculative product,
// two for a corrected one. It also checks that a product caused by counter
// overflow (four or more ones in some counter, worked out here from the
// operands) is always corrected and reported as such.
// Mechanisms that must each happen at least once: a speculative product,
// a correction caused by a counter, one caused by the speculative adder, a
// stall (valid offered while not ready), and back-to-back operands taken on
// consecutive edges.
module tb_spec_mult;
  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic        in_ready;
  logic [15:0] in_a, in_b;
  logic        out_valid;
  logic [31:0] out_p;
  logic        out_corrected, out_err_cnt, out_err_add;

  spec_mult dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_a(in_a), .in_b(in_b),
    .out_valid(out_valid), .out_p(out_p), .out_corrected(out_corrected),
    .out_err_cnt(out_err_cnt), .out_err_add(out_err_add));

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    logic [31:0] p;
    logic        cnt_err;
    int          edge_taken;
  } exp_t;
  exp_t q[$];

  int n_spec = 0, n_corr_cnt = 0, n_corr_add = 0, n_stall = 0, n_b2b = 0;
  int last_take = -10;
  localparam int NOPS = 6000;
  int sent = 0, received = 0;

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

  initial begin
    repeat (20 * NOPS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_a     = '0;
    in_b     = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (received < NOPS) begin
      @(negedge clk);
      // outputs registered at the last edge
      if (out_valid) begin
        exp_t e;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL product %h with nothing outstanding", out_p);
        end else begin
          e = q.pop_front();
          received++;
          checks++;
          if (out_p != e.p) begin
            failures++;
            $display("FAIL product %h, expected %h", out_p, e.p);
          end
          checks++;
          if (cyc - e.edge_taken != (out_corrected ? 2 : 1)) begin
            failures++;
            $display("FAIL latency %0d edges, corrected %0b", cyc - e.edge_taken, out_corrected);
          end
          checks++;
          if (e.cnt_err && !(out_corrected && out_err_cnt)) begin
            failures++;
            $display("FAIL counter overflow not corrected for %h", e.p);
          end
          if (out_corrected && out_err_cnt != e.cnt_err) begin
            checks++;
            failures++;
            $display("FAIL counter flag %0b, expected %0b", out_err_cnt, e.cnt_err);
          end
          if (!out_corrected) n_spec++;
          if (out_corrected && out_err_cnt) n_corr_cnt++;
          if (out_corrected && out_err_add) n_corr_add++;
        end
      end
      // offer the next operands
      if (!in_valid || in_ready) begin
        if (sent < NOPS && ($urandom_range(0, 9) < 8)) begin
          in_valid = 1'b1;
          case ($urandom_range(0, 3))
            0: begin in_a = 16'($urandom) | 16'($urandom); in_b = 16'($urandom) | 16'($urandom); end
            1: begin in_a = 16'($urandom); in_b = 16'($urandom) | 16'($urandom); end
            default: begin in_a = 16'($urandom); in_b = 16'($urandom); end
          endcase
          if (sent == 0) begin in_a = '1; in_b = '1; end
        end else in_valid = 1'b0;
      end
      #1;
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        exp_t e;
        e.p          = 32'(in_a) * 32'(in_b);
        e.cnt_err    = ref_err_cnt(in_a, in_b);
        e.edge_taken = cyc + 1;
        q.push_back(e);
        sent++;
        if (last_take == cyc) n_b2b++;
        last_take = cyc + 1;
      end
    end
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d products missing", q.size());
    end
    $display("speculative %0d, corrected for counter %0d, for adder %0d, stalls %0d, back-to-back %0d",
             n_spec, n_corr_cnt, n_corr_add, n_stall, n_b2b);
    checks++;
    if (n_spec == 0 || n_corr_cnt == 0 || n_corr_add == 0 || n_stall == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
