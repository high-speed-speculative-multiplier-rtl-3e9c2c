// tdm_tree: carry-save reduction tree built by the three-dimensional method
// (TDM).
//
// Input: a bit matrix organised by column. Column k holds HEIGHT[k] bits,
// bits[k][0 .. HEIGHT[k]-1]; the rest of bits[k] is not read. Every bit has
// an estimated arrival time DLY[k][h] (in arbitrary gate-delay units).
// Output: two rows whose sum equals the weighted sum of all input bits,
// modulo 2^W (carries out of column W-1 are dropped).
//
// How it works: the wiring is planned at elaboration time by the constant
// function make_plan. Columns are processed from the least significant one
// up. In a column, while more than two bits remain, the three bits that
// arrive earliest are fed to a full adder; its sum goes back into the same
// column and its carry into the next one, each with an arrival time of the
// latest input plus the adder's sum or carry delay. Bits that arrive late
// (such as the outputs of the speculative counters) are therefore consumed
// near the end of the tree, on its shortest path, and the paths through the
// tree come out roughly balanced. The description names the method and its
// aim but gives no netlist; this greedy full-adder-only plan and the delay
// numbers (sum +2, carry +1) are this design's choices.
// The plan becomes an array of nodes: node 0 .. NIN-1 are the input bits,
// then two nodes (sum, carry) per full adder, then one constant-zero node
// used where a column ends up with fewer than two bits. Input bits above a
// column's HEIGHT and the carries out of the top column are left unread.
// Purely combinational.
module tdm_tree #(
  parameter int W    = 8,                        // number of columns
  parameter int HMAX = 8,                        // bits per column, maximum
  parameter bit [W-1:0][7:0]           HEIGHT = {W{8'(HMAX)}},
  parameter bit [W-1:0][HMAX-1:0][7:0] DLY    = '0
) (
  input  logic [W-1:0][HMAX-1:0] bits,
  output logic [W-1:0]           row0,
  output logic [W-1:0]           row1
);

  localparam int NIN   = W * HMAX;
  localparam int FAMAX = NIN;                    // each adder removes one bit
  localparam int LMAX  = 2 * HMAX + 2;           // bits in a column, at most
  localparam int IDW   = $clog2(NIN + 2 * FAMAX + 1) + 1;
  localparam int D_SUM = 2;
  localparam int D_CAR = 1;

  typedef struct packed {
    logic [FAMAX-1:0][2:0][IDW-1:0] fa_in;       // inputs of each adder
    logic [W-1:0][1:0][IDW-1:0]     outs;        // node of each output bit
    logic [W-1:0][1:0]              out_used;    // output bit exists
    logic [IDW-1:0]                 nfa;         // adders used
  } plan_t;

  function automatic plan_t make_plan();
    plan_t p;
    int    id [W*LMAX];
    int    dl [W*LMAX];
    int    len [W];
    int    nfa;
    p.out_used = '0;
    p.outs     = '0;
    for (int f = 0; f < FAMAX; f++) p.fa_in[f] = '0;
    nfa = 0;
    for (int k = 0; k < W; k++) begin
      len[k] = 0;
      for (int h = 0; h < LMAX; h++) begin
        id[k * LMAX + h] = 0;
        dl[k * LMAX + h] = 0;
      end
    end
    for (int k = 0; k < W; k++)
      for (int h = 0; h < int'(HEIGHT[k]) && h < HMAX; h++) begin
        id[k * LMAX + len[k]] = k * HMAX + h;
        dl[k * LMAX + len[k]] = int'(DLY[k][h]);
        len[k]++;
      end
    for (int k = 0; k < W; k++) begin
      for (int it = 0; it < LMAX && len[k] > 2; it++) begin
        int pick [3];
        int mx;
        // take the three earliest bits out of the column
        for (int t = 0; t < 3; t++) begin
          int best;
          best = 0;
          for (int h = 1; h < LMAX; h++)
            if (h < len[k] && dl[k * LMAX + h] < dl[k * LMAX + best]) best = h;
          pick[t] = id[k * LMAX + best];
          if (t == 0 || dl[k * LMAX + best] > mx) mx = dl[k * LMAX + best];
          id[k * LMAX + best] = id[k * LMAX + len[k] - 1];
          dl[k * LMAX + best] = dl[k * LMAX + len[k] - 1];
          len[k]--;
        end
        p.fa_in[nfa][0] = IDW'(pick[0]);
        p.fa_in[nfa][1] = IDW'(pick[1]);
        p.fa_in[nfa][2] = IDW'(pick[2]);
        id[k * LMAX + len[k]] = NIN + 2 * nfa;           // sum stays in column k
        dl[k * LMAX + len[k]] = mx + D_SUM;
        len[k]++;
        if (k + 1 < W) begin                     // carry moves up one column
          id[(k + 1) * LMAX + len[k + 1]] = NIN + 2 * nfa + 1;
          dl[(k + 1) * LMAX + len[k + 1]] = mx + D_CAR;
          len[k + 1]++;
        end
        nfa++;
      end
      for (int r = 0; r < 2; r++)
        if (r < len[k]) begin
          p.outs[k][r]     = IDW'(id[k * LMAX + r]);
          p.out_used[k][r] = 1'b1;
        end
    end
    p.nfa = IDW'(nfa);
    return p;
  endfunction

  localparam plan_t PLAN  = make_plan();
  localparam int    NFA   = int'(PLAN.nfa);
  localparam int    NNODE = NIN + 2 * NFA + 1;
  localparam int    ZERO  = NNODE - 1;

  logic [NNODE-1:0] node;

  assign node[NIN-1:0] = bits;
  assign node[ZERO]    = 1'b0;

  for (genvar f = 0; f < NFA; f++) begin : g_fa
    localparam int I0 = int'(PLAN.fa_in[f][0]);
    localparam int I1 = int'(PLAN.fa_in[f][1]);
    localparam int I2 = int'(PLAN.fa_in[f][2]);
    full_adder u_fa (
      .a    (node[I0]),
      .b    (node[I1]),
      .ci   (node[I2]),
      .s    (node[NIN + 2 * f]),
      .co   (node[NIN + 2 * f + 1])
    );
  end

  for (genvar k = 0; k < W; k++) begin : g_out
    localparam int O0 = PLAN.out_used[k][0] ? int'(PLAN.outs[k][0]) : ZERO;
    localparam int O1 = PLAN.out_used[k][1] ? int'(PLAN.outs[k][1]) : ZERO;
    assign row0[k] = node[O0];
    assign row1[k] = node[O1];
  end

endmodule
