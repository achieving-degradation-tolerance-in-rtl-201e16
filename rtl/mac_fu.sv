// mac_fu: functional unit of the solver - multiplier, adder and accumulator.
//
// The unit accepts one (coefficient, vector element) pair per two-phase
// handshake (a request is pending while in_req != in_ack), multiplies the two
// 16-bit signed values and adds the 32-bit product into its accumulator ACC.
// The accumulator keeps a partial sum of the current row; which products a
// unit receives depends on the dispatchers, so only the sum of all units'
// accumulators is meaningful. acc_clr empties it between rows.
//
// The arithmetic is dual-rail, as in the published design: the product is
// put on a dual-rail word, a completion detector (OR per bit, C-element)
// reports when every bit is valid, the value is accumulated, the word returns
// to the spacer, and only when the detector reports the spacer is the input
// acknowledged. A unit therefore answers only when its work is really done,
// which is what lets the dispatchers see a slow unit as busy. The product and
// the dual-rail register are clocked here (one cycle per phase), an
// assumption of this model; a pair takes five clock cycles from request to
// acknowledge.
//
//   in_data/in_req/in_ack  two-phase operand channel
//   acc_clr                clear the accumulator (unit must be idle)
//   acc                    accumulator value
//   done                   one-cycle pulse when a product has been accumulated
//                          and the input acknowledged
//   code_err               sticky: the dual-rail register held a non-code
//                          word (both rails of a bit high), i.e. a stuck-at
//                          fault was detected; cleared only by reset
module mac_fu
  import gs_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  operand_t               in_data,
  input  logic                   in_req,
  output logic                   in_ack,
  input  logic                   acc_clr,
  output logic signed [ACCW-1:0] acc,
  output logic                   done,
  output logic                   code_err
);

  typedef enum logic [1:0] {S_IDLE, S_EVAL, S_RTZ} state_e;

  state_e       state;
  dr_word_t     dr;        // dual-rail product register
  logic         complete;  // completion detector output
  logic [PW-1:0] prod;

  assign prod = PW'(in_data.coef * in_data.vec);

  logic          invalid;

  completion_detector #(.N(PW)) u_cd (
    .clk, .rst_n, .t(dr.t), .f(dr.f), .done(complete), .invalid);

  always_ff @(posedge clk) begin
    if (!rst_n)       code_err <= 1'b0;
    else if (invalid) code_err <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      dr     <= '0;
      acc    <= '0;
      in_ack <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (in_req != in_ack) begin
          dr    <= dr_encode(prod);          // evaluate: spacer -> valid
          state <= S_EVAL;
        end
        S_EVAL: if (complete) begin
          acc   <= acc + ACCW'(signed'(dr_decode(dr)));
          dr    <= '0;                       // return to spacer
          state <= S_RTZ;
        end
        S_RTZ: if (!complete) begin
          in_ack <= ~in_ack;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      if (acc_clr) acc <= '0;
    end
  end

  // The accumulator is cleared only between rows, never mid-operation.
  assert property (@(posedge clk) disable iff (!rst_n) acc_clr |-> state == S_IDLE);

endmodule
