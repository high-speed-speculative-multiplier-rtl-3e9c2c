// pp_gen_recode: partial-product generation and recoding.
//
// Forms every partial product a_i*b_j of the unsigned N x N product and lays
// them out by column (column k = weight 2^k, k = 0 .. 2N-2). In the inner
// columns RC_LO .. RC_HI each pair a_i*b_j, a_j*b_i (i < j) is recoded into
// A_ij = a_i*b_j AND a_j*b_i and O_ij = a_i*b_j OR a_j*b_i, which have the
// same sum; A_ij is high with probability 1/16 for random operands, which is
// what lets the speculative counters assume few high inputs.
// Outputs:
//   kept[k][h], h < kept_count(k): the bits that stay in the carry-save
//     matrix. In a recoded column: O_ij for i = lowest index upwards, then
//     the diagonal a_{k/2}*b_{k/2} if k is even. Elsewhere: a_i*b_{k-i}.
//   acol[k][h], h < a_count(k): the A_ij terms of column k, i ascending.
// Slots above those counts are driven to zero. Combinational.
// The recoding rule follows the description; the default span of recoded
// columns (8 .. 22, the columns at least nine products high) is this
// design's reading of the published 16 x 16 matrix, and the bit ordering is
// this design's choice.
module pp_gen_recode
  import spec_mult_pkg::*;
#(
  parameter int N     = 16,
  parameter int RC_LO = 8,
  parameter int RC_HI = 22,
  parameter int NCOL  = 2 * N - 1,
  parameter int KH    = max_kept(N, RC_LO, RC_HI),
  parameter int AH    = (max_a(N, RC_LO, RC_HI) > 0) ? max_a(N, RC_LO, RC_HI) : 1
) (
  input  logic [N-1:0]                a,
  input  logic [N-1:0]                b,
  output logic [NCOL-1:0][KH-1:0]     kept,
  output logic [NCOL-1:0][AH-1:0]     acol
);

  always_comb begin
    kept = '0;
    acol = '0;
    for (int k = 0; k < NCOL; k++) begin
      int lo;
      int hi;
      int h;
      lo = col_lo(k, N);
      hi = col_hi(k, N);
      h  = 0;
      if (is_recoded(k, RC_LO, RC_HI)) begin
        for (int i = lo; i <= hi; i++) begin
          if (i < k - i) begin
            kept[k][h] = (a[i] & b[k-i]) | (a[k-i] & b[i]);
            acol[k][h] = (a[i] & b[k-i]) & (a[k-i] & b[i]);
            h++;
          end
        end
        if (k % 2 == 0) kept[k][h] = a[k/2] & b[k/2];
      end else begin
        for (int i = lo; i <= hi; i++) begin
          kept[k][h] = a[i] & b[k-i];
          h++;
        end
      end
    end
  end

endmodule
