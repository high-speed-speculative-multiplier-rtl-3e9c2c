// corr_block: error detection and correction word for one (m:2)
// speculative counter.
//
// Sees the same M inputs as its counter. The error flag E is high when four
// or more inputs are high, the only case the counter gets wrong. The counter
// then outputs 2*C + S = 2 + (count mod 2), so the missing amount is
// count - 2 - (count mod 2) = 2*((count >> 1) - 1): always even. The output
// word ew therefore counts in units of two: its bit 0 has twice the weight
// of the counter's S output (the weight of C). ew is zero when E is low.
// For M = 4 this reduces to a single AND4 bit, which is also the flag.
// The flag and the correction follow the description; computing them from a
// population count is this design's choice. Purely combinational.
module corr_block
  import spec_mult_pkg::*;
#(
  parameter int M   = 4,
  parameter int EWW = ew_width(M)  // width of ew, in units of two
) (
  input  logic [M-1:0]   x,
  output logic           e,        // four or more inputs high
  output logic [EWW-1:0] ew        // correction, LSB weight = weight of C
);

  localparam int CW = $clog2(M + 1);

  always_comb begin
    logic [CW-1:0] cnt;
    logic [CW-1:0] half_m1;
    cnt = '0;
    for (int i = 0; i < M; i++) cnt = cnt + CW'(x[i]);
    e       = (int'(cnt) >= 4);
    half_m1 = (cnt >> 1) - CW'(1);
    ew      = e ? EWW'(half_m1) : '0;
  end

endmodule
