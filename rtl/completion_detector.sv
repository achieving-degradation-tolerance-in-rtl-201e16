// completion_detector: completion detection of a dual-rail word.
//
// Each bit travels on a true rail and a false rail. A bit is valid once one of
// its rails is high (an OR of the two rails); the word is complete once every
// bit is valid. A Muller C-element joins the per-bit valid signals: its output
// rises when all bits are valid, falls when all bits have returned to the
// spacer (both rails low), and otherwise holds. This is the completion scheme
// of dual-rail asynchronous logic. Here the C-element's state is a flip-flop,
// so `done` follows the rails one clock cycle later (the clocking is this
// design's choice; the OR-per-bit plus C-element structure is the scheme's).
//
// Both rails of a bit high is not a code word. It cannot occur in a
// fault-free circuit, so it reveals a stuck-at-1 rail: `invalid` flags it
// (combinational). A stuck-at-0 rail shows instead as a word that never
// completes.
//
//   t, f     true and false rails, N bits each
//   done     completion: 1 = word valid, 0 = word back to spacer
//   invalid  some bit has both rails high
module completion_detector #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] t,
  input  logic [N-1:0] f,
  output logic         done,
  output logic         invalid
);

  logic [N-1:0] bit_valid;
  logic         all_valid, all_spacer;

  assign bit_valid  = t | f;
  assign all_valid  = &bit_valid;
  assign all_spacer = ~|bit_valid;

  // C-element over all bit_valid signals.
  always_ff @(posedge clk) begin
    if (!rst_n)          done <= 1'b0;
    else if (all_valid)  done <= 1'b1;
    else if (all_spacer) done <= 1'b0;
  end

  assign invalid = |(t & f);

endmodule
