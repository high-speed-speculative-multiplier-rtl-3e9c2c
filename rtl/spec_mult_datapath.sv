// spec_mult_datapath: the combinational datapath of the speculative
// multiplier, unsigned N x N -> 2N bits.
//
// Speculative path (one clock cycle):
//   pp_gen_recode  forms the partial products and recodes the inner columns
//                  into A_ij (AND) and O_ij (OR) terms;
//   spec_counter   one (m:2) speculative counter per recoded column sums that
//                  column's m A terms into S (same column) and C (next one);
//   tdm_tree       (speculative) reduces the O terms, the un-recoded products
//                  and the counters' S and C to two rows; S and C are given
//                  a later arrival time, so the tree consumes them last;
//   spec_adder     adds the two rows into the speculative product ys and
//                  flags its own misprediction.
// Error flag: each counter has a corr_block seeing the same A terms; its
//   flag (four or more A terms high) is ORed with the others and with the
//   adder's flag into err. err_cnt and err_add are the two halves of that OR.
// Correction path (meant as a two-cycle path): a second tdm_tree adds the
//   correction words EW of all corr_blocks to the two rows of the
//   speculative tree, and cp_adder turns the result into the exact product y.
//   y does not depend on the speculative adder, so that adder needs only its
//   flag, not a correction of its own.
// When err is low, ys == y == a * b. When err is high, y == a * b and ys may
// be wrong. Timing: ys/err must settle in one cycle; y is given two cycles
// by the controller in spec_mult (a multicycle path for timing analysis).
// The structure follows the description's block diagram; the arrival-time
// estimates fed to the speculative tree are this design's own.
module spec_mult_datapath
  import spec_mult_pkg::*;
#(
  parameter int N       = 16,
  parameter int RC_LO   = 8,
  parameter int RC_HI   = 22,
  parameter int ADD_BLK = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] ys,        // speculative product
  output logic           err,       // ys may be wrong, use y
  output logic           err_cnt,   // some counter had four or more ones
  output logic           err_add,   // speculative adder mispredicted
  output logic [2*N-1:0] y          // exact product (correction path)
);

  localparam int W    = 2 * N;      // product width = tree width
  localparam int NCOL = 2 * N - 1;  // columns of partial products
  localparam int KH   = max_kept(N, RC_LO, RC_HI);
  localparam int AMAX = max_a(N, RC_LO, RC_HI);
  localparam int AH   = (AMAX > 0) ? AMAX : 1;
  localparam int EWMAX = ew_width(AMAX);

  // ---- sizes of the two trees -------------------------------------------
  function automatic int acnt(int k);
    return (k >= 0 && k < NCOL) ? a_count(k, N, RC_LO, RC_HI) : 0;
  endfunction

  function automatic int kcnt(int k);
    return (k >= 0 && k < NCOL) ? kept_count(k, N, RC_LO, RC_HI) : 0;
  endfunction

  // speculative tree column k: kept bits, S of counter k, C of counter k-1
  function automatic int s_height(int k);
    return kcnt(k) + ((acnt(k) > 0) ? 1 : 0) + ((acnt(k - 1) > 0) ? 1 : 0);
  endfunction

  // correction tree column k: two rows, plus every EW bit of weight 2^k
  // (EW of counter j has bits at columns j+1 .. j+ew_width)
  function automatic int c_height(int k);
    int h = 2;
    for (int j = 0; j < NCOL; j++)
      if (acnt(j) > 0 && k >= j + 1 && k <= j + ew_width(acnt(j))) h++;
    return h;
  endfunction

  function automatic int max_s_height();
    int m = 1;
    for (int k = 0; k < W; k++) if (s_height(k) > m) m = s_height(k);
    return m;
  endfunction

  function automatic int max_c_height();
    int m = 2;
    for (int k = 0; k < W; k++) if (c_height(k) > m) m = c_height(k);
    return m;
  endfunction

  localparam int SH = max_s_height();
  localparam int CH = max_c_height();

  // arrival-time estimates, in gate delays: a product 1, an O term 2 (AND,
  // OR), a counter output 2 + log2(m) (A term, then the XOR / carry tree)
  function automatic bit [W-1:0][7:0] s_heights();
    bit [W-1:0][7:0] r;
    for (int k = 0; k < W; k++) r[k] = 8'(s_height(k));
    return r;
  endfunction

  function automatic bit [W-1:0][SH-1:0][7:0] s_delays();
    bit [W-1:0][SH-1:0][7:0] r;
    r = '0;
    for (int k = 0; k < W; k++) begin
      int h = 0;
      for (int t = 0; t < kcnt(k); t++) begin
        r[k][h] = (acnt(k) > 0) ? 8'd2 : 8'd1;
        h++;
      end
      if (acnt(k) > 0) begin
        r[k][h] = 8'(2 + $clog2(acnt(k)));
        h++;
      end
      if (acnt(k - 1) > 0) r[k][h] = 8'(2 + $clog2(acnt(k - 1)));
    end
    return r;
  endfunction

  function automatic bit [W-1:0][7:0] c_heights();
    bit [W-1:0][7:0] r;
    for (int k = 0; k < W; k++) r[k] = 8'(c_height(k));
    return r;
  endfunction

  // ---- partial products and recoding ------------------------------------
  logic [NCOL-1:0][KH-1:0] kept;
  logic [NCOL-1:0][AH-1:0] acol;

  pp_gen_recode #(
    .N(N), .RC_LO(RC_LO), .RC_HI(RC_HI), .NCOL(NCOL), .KH(KH), .AH(AH)
  ) u_ppg (
    .a    (a),
    .b    (b),
    .kept (kept),
    .acol (acol)
  );

  // ---- speculative counters and correction blocks -----------------------
  logic [NCOL-1:0]            cnt_s;
  logic [NCOL-1:0]            cnt_c;
  logic [NCOL-1:0]            cnt_e;
  logic [NCOL-1:0][EWMAX-1:0] cnt_ew;

  for (genvar k = 0; k < NCOL; k++) begin : g_col
    localparam int M = a_count(k, N, RC_LO, RC_HI);
    if (M > 0) begin : g_cnt
      localparam int EWW = ew_width(M);
      logic [EWW-1:0] ew;
      spec_counter #(.M(M)) u_cnt (
        .x (acol[k][M-1:0]),
        .s (cnt_s[k]),
        .c (cnt_c[k])
      );
      corr_block #(.M(M), .EWW(EWW)) u_corr (
        .x  (acol[k][M-1:0]),
        .e  (cnt_e[k]),
        .ew (ew)
      );
      assign cnt_ew[k] = EWMAX'(ew);
    end else begin : g_none
      assign cnt_s[k]  = 1'b0;
      assign cnt_c[k]  = 1'b0;
      assign cnt_e[k]  = 1'b0;
      assign cnt_ew[k] = '0;
    end
  end

  assign err_cnt = |cnt_e;

  // ---- speculative TDM carry-save tree ----------------------------------
  logic [W-1:0][SH-1:0] s_bits;

  always_comb begin
    s_bits = '0;
    for (int k = 0; k < W; k++) begin
      int h;
      h = 0;
      for (int t = 0; t < kcnt(k); t++) begin
        s_bits[k][h] = kept[k][t];
        h++;
      end
      if (acnt(k) > 0) begin
        s_bits[k][h] = cnt_s[k];
        h++;
      end
      if (acnt(k - 1) > 0) s_bits[k][h] = cnt_c[k-1];
    end
  end

  logic [W-1:0] s_row0, s_row1;

  tdm_tree #(
    .W(W), .HMAX(SH), .HEIGHT(s_heights()), .DLY(s_delays())
  ) u_tdm_spec (
    .bits (s_bits),
    .row0 (s_row0),
    .row1 (s_row1)
  );

  // ---- speculative adder ------------------------------------------------
  spec_adder #(.W(W), .BLK(ADD_BLK)) u_sadd (
    .a   (s_row0),
    .b   (s_row1),
    .sum (ys),
    .err (err_add)
  );

  assign err = err_cnt | err_add;

  // ---- correction TDM carry-save tree and exact adder -------------------
  logic [W-1:0][CH-1:0] c_bits;

  always_comb begin
    int h [W];
    c_bits = '0;
    for (int k = 0; k < W; k++) begin
      c_bits[k][0] = s_row0[k];
      c_bits[k][1] = s_row1[k];
      h[k] = 2;
    end
    for (int j = 0; j < NCOL; j++)
      if (acnt(j) > 0)
        for (int t = 0; t < ew_width(acnt(j)); t++)
          if (j + 1 + t < W) begin
            c_bits[j+1+t][h[j+1+t]] = cnt_ew[j][t];
            h[j+1+t]++;
          end
  end

  logic [W-1:0] c_row0, c_row1;

  tdm_tree #(
    .W(W), .HMAX(CH), .HEIGHT(c_heights()), .DLY('0)
  ) u_tdm_corr (
    .bits (c_bits),
    .row0 (c_row0),
    .row1 (c_row1)
  );

  cp_adder #(.W(W)) u_cpa (
    .a   (c_row0),
    .b   (c_row1),
    .sum (y)
  );

endmodule
