// spec_mult: speculative N x N unsigned multiplier with a correction unit.
//
// The product is first computed speculatively: the recoded inner partial
// products are summed by (m:2) speculative counters that are only right when
// at most three of their inputs are high, and the final addition uses a
// speculative adder. Both mispredictions are rare for random operands and
// both are detected; the OR of all detection flags is the error flag. When
// it is low the speculative product is delivered after one cycle of
// computation; when it is high the unit spends a second cycle, and delivers
// the exact product from the correction path (see spec_mult_datapath).
//
// Interface (valid/ready on the input, a one-cycle valid pulse on the
// output, which cannot be stalled):
//   in_valid/in_ready/in_a/in_b : operands are taken on a clock edge where
//                                 in_valid && in_ready.
//   out_valid/out_p             : product, out_valid high for one cycle.
//   out_corrected               : this product came from the correction
//                                 path (the error flag was raised).
//   out_err_cnt/out_err_add     : which flags caused that: a speculative
//                                 counter, the speculative adder, or both.
// Timing: operands taken at edge t are computed in the cycle after it (state
// SPEC). Without error the product is registered at edge t+1 and a new
// operand pair can be taken at that same edge, so the rate is one product
// per cycle. With error the unit holds the operands one more cycle (state
// CORR, in_ready low during SPEC), registers the exact product at edge t+2
// and then takes new operands. The correction path from the operand register
// to the output register is therefore a two-cycle (multicycle) path.
// The speculate/correct scheme, the single-cycle error flag and the two-cycle
// correction follow the description; the handshake, the state machine, the
// registers and the active-low synchronous reset are this design's choices.
module spec_mult #(
  parameter int N       = 16,  // operand width
  parameter int RC_LO   = 8,   // first recoded column
  parameter int RC_HI   = 22,  // last recoded column
  parameter int ADD_BLK = 8    // block size of the speculative adder
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [N-1:0]   in_a,
  input  logic [N-1:0]   in_b,
  output logic           out_valid,
  output logic [2*N-1:0] out_p,
  output logic           out_corrected,
  output logic           out_err_cnt,
  output logic           out_err_add
);

  typedef enum logic [1:0] {
    IDLE = 2'd0,   // no operands held
    SPEC = 2'd1,   // speculative cycle for the held operands
    CORR = 2'd2    // second cycle, exact product from the correction path
  } state_t;

  state_t         state;
  logic [N-1:0]   op_a, op_b;
  logic [2*N-1:0] ys, y;
  logic           err, err_cnt, err_add;
  logic           err_cnt_q, err_add_q;

  spec_mult_datapath #(
    .N(N), .RC_LO(RC_LO), .RC_HI(RC_HI), .ADD_BLK(ADD_BLK)
  ) u_dp (
    .a       (op_a),
    .b       (op_b),
    .ys      (ys),
    .err     (err),
    .err_cnt (err_cnt),
    .err_add (err_add),
    .y       (y)
  );

  // new operands are taken unless the held ones need their second cycle
  assign in_ready = !(state == SPEC && err);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= IDLE;
      op_a          <= '0;
      op_b          <= '0;
      out_valid     <= 1'b0;
      out_p         <= '0;
      out_corrected <= 1'b0;
      out_err_cnt   <= 1'b0;
      out_err_add   <= 1'b0;
      err_cnt_q     <= 1'b0;
      err_add_q     <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        SPEC: begin
          if (err) begin
            err_cnt_q <= err_cnt;
            err_add_q <= err_add;
          end else begin
            out_valid     <= 1'b1;
            out_p         <= ys;
            out_corrected <= 1'b0;
            out_err_cnt   <= 1'b0;
            out_err_add   <= 1'b0;
          end
        end
        CORR: begin
          out_valid     <= 1'b1;
          out_p         <= y;
          out_corrected <= 1'b1;
          out_err_cnt   <= err_cnt_q;
          out_err_add   <= err_add_q;
        end
        default: ;
      endcase
      if (in_valid && in_ready) begin
        op_a  <= in_a;
        op_b  <= in_b;
        state <= SPEC;
      end else if (state == SPEC && err) begin
        state <= CORR;
      end else begin
        state <= IDLE;
      end
    end
  end

  // the operands must stay put for both cycles of the correction path
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (state == CORR) |-> ($stable(op_a) && $stable(op_b)));
  // a corrected cycle always follows a flagged speculative cycle
  a_corr: assert property (@(posedge clk) disable iff (!rst_n)
    (state == SPEC && err) |=> (state == CORR));

endmodule
