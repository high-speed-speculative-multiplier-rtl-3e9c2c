// tb_tdm_tree: checks the carry-save tree on two matrices: an irregular one
// (column heights 1..6, mixed arrival times) and the module's default full
// 8 x 8 rectangle. For random bits, row0 + row1 must equal the weighted sum
// of the bits that lie inside the column heights, mod 2^W; bits above the
// heights are randomised too and must have no effect.
module tb_tdm_tree;
  int checks = 0;
  int failures = 0;

  localparam int W = 8;
  localparam int H = 6;
  localparam bit [W-1:0][7:0] HEIGHT = {8'd2, 8'd5, 8'd6, 8'd6, 8'd3, 8'd4, 8'd1, 8'd2};
  localparam bit [W-1:0][H-1:0][7:0] DLY = {
    {8'd0, 8'd0, 8'd0, 8'd0, 8'd3, 8'd1},
    {8'd0, 8'd5, 8'd1, 8'd1, 8'd2, 8'd1},
    {8'd4, 8'd4, 8'd2, 8'd2, 8'd1, 8'd1},
    {8'd6, 8'd1, 8'd1, 8'd1, 8'd1, 8'd1},
    {8'd0, 8'd0, 8'd0, 8'd1, 8'd2, 8'd3},
    {8'd0, 8'd0, 8'd4, 8'd1, 8'd2, 8'd1},
    {8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd1},
    {8'd0, 8'd0, 8'd0, 8'd0, 8'd1, 8'd1}
  };

  logic [W-1:0][H-1:0] bits_i;
  logic [W-1:0]        r0_i, r1_i;
  logic [7:0][7:0]     bits_d;
  logic [7:0]          r0_d, r1_d;

  tdm_tree #(.W(W), .HMAX(H), .HEIGHT(HEIGHT), .DLY(DLY)) dut_i (
    .bits(bits_i), .row0(r0_i), .row1(r1_i));
  tdm_tree dut_d (.bits(bits_d), .row0(r0_d), .row1(r1_d));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int ref_i, ref_d;
      for (int k = 0; k < W; k++) bits_i[k] = H'($urandom);
      for (int k = 0; k < 8; k++) bits_d[k] = 8'($urandom);
      if (it == 0) begin bits_i = '1; bits_d = '1; end
      #1;
      ref_i = 0;
      ref_d = 0;
      for (int k = 0; k < W; k++)
        for (int h = 0; h < H; h++)
          if (h < int'(HEIGHT[k])) ref_i += int'(bits_i[k][h]) << k;
      for (int k = 0; k < 8; k++)
        for (int h = 0; h < 8; h++) ref_d += int'(bits_d[k][h]) << k;
      checks++;
      if (8'(int'(r0_i) + int'(r1_i)) != 8'(ref_i)) begin
        failures++;
        $display("FAIL irregular: %h + %h != %h", r0_i, r1_i, 8'(ref_i));
      end
      checks++;
      if (8'(int'(r0_d) + int'(r1_d)) != 8'(ref_d)) begin
        failures++;
        $display("FAIL default: %h + %h != %h", r0_d, r1_d, 8'(ref_d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
