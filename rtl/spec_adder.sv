// spec_adder: speculative adder with an error flag.
//
// The W-bit operands are cut into blocks of BLK bits. The carry into block b
// is not propagated from the bottom of the word; it is guessed from block
// b-1 alone, as the carry that block would produce with a zero carry-in (its
// group generate G). So no carry chain is longer than two blocks. The guess
// fails only when block b-1 propagates (all its bits have a ^ b = 1, group
// propagate P) while a carry enters it; the first wrong block always has a
// correctly guessed carry-in, so
//     err = OR over b = 1 .. NB-2 of ( P[b] & G[b-1] )
// is high exactly when the sum is wrong (the carry out of the top block is
// dropped, the sum being taken modulo 2^W). No correction is built: when err
// is high the multiplier takes its result from the exact path instead.
// The description uses a speculative adder from the literature without
// giving it; this block-lookahead form and BLK are this design's choices.
// Purely combinational.
module spec_adder #(
  parameter int W   = 32,
  parameter int BLK = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         err
);

  localparam int NB = (W + BLK - 1) / BLK;

  logic [NB-1:0] grp_g;   // block generates a carry with carry-in 0
  logic [NB-1:0] grp_p;   // block propagates its carry-in

  always_comb begin
    sum   = '0;
    grp_g = '0;
    grp_p = '0;
    for (int blk = 0; blk < NB; blk++) begin
      logic c;
      logic pall;
      // block with its guessed carry-in
      c = (blk == 0) ? 1'b0 : grp_g[(blk == 0) ? 0 : blk - 1];
      for (int i = blk * BLK; i < (blk + 1) * BLK && i < W; i++) begin
        sum[i] = a[i] ^ b[i] ^ c;
        c      = (a[i] & b[i]) | ((a[i] ^ b[i]) & c);
      end
      // same block with carry-in 0, and its propagate
      c    = 1'b0;
      pall = 1'b1;
      for (int i = blk * BLK; i < (blk + 1) * BLK && i < W; i++) begin
        c    = (a[i] & b[i]) | ((a[i] ^ b[i]) & c);
        pall = pall & (a[i] ^ b[i]);
      end
      grp_g[blk] = c;
      grp_p[blk] = pall;
    end
    err = 1'b0;
    for (int blk = 1; blk < NB - 1; blk++) err = err | (grp_p[blk] & grp_g[blk - 1]);
  end

endmodule
