// gs_pkg: types and constants shared by the Gauss-Seidel solver.
//
// The solver works on 16-bit signed fixed-point variables (the 16-bit width
// and the 32-variable size follow the test chip; the binary point position is
// this design's choice). A datum travelling from a data generator to a
// functional unit is one (coefficient, vector element) pair. Dual-rail words
// carry each bit on a true rail and a false rail: (t,f) = (0,0) is the spacer
// (no data), (1,0) a one and (0,1) a zero.
package gs_pkg;

  // Width of one variable, coefficient or b entry.
  localparam int unsigned W    = 16;
  // Fraction bits of the fixed-point format (Q7.8 with sign).
  localparam int unsigned FRAC = 8;
  // Width of a product of two variables.
  localparam int unsigned PW   = 2 * W;
  // Accumulator width: products plus headroom for 32 terms.
  localparam int unsigned ACCW = PW + 8;

  // One operand pair sent to a functional unit.
  typedef struct packed {
    logic signed [W-1:0] coef;  // row coefficient (-a_ij/a_ii, or 1/a_ii)
    logic signed [W-1:0] vec;   // x_j, or b_i in the diagonal position
  } operand_t;

  // Kind of word written through the host port.
  typedef enum logic [1:0] {
    HOST_COEF = 2'd0,   // coefficient of row/column
    HOST_X    = 2'd1,   // initial value of x_j
    HOST_B    = 2'd2    // right-hand side b_j
  } host_kind_e;

  // Dual-rail encoding of a word: true rails in .t, false rails in .f.
  typedef struct packed {
    logic [PW-1:0] t;
    logic [PW-1:0] f;
  } dr_word_t;

  function automatic dr_word_t dr_encode(input logic [PW-1:0] v);
    dr_word_t d;
    d.t = v;
    d.f = ~v;
    return d;
  endfunction

  // Decode a valid dual-rail word (the true rails carry the value).
  function automatic logic [PW-1:0] dr_decode(input dr_word_t d);
    return d.t & ~d.f;
  endfunction

  // Scale a Q(FRAC) accumulator sum of Q(2*FRAC) products back to a W-bit
  // variable: arithmetic shift right by FRAC, then saturate.
  localparam logic signed [ACCW-1:0] VAR_MAX = ACCW'((64'sd1 <<< (W - 1)) - 1);
  localparam logic signed [ACCW-1:0] VAR_MIN = ACCW'(-(64'sd1 <<< (W - 1)));

  function automatic logic signed [W-1:0] acc_to_var(input logic signed [ACCW-1:0] s);
    logic signed [ACCW-1:0] sh;
    sh = s >>> FRAC;
    if (sh > VAR_MAX)      return VAR_MAX[W-1:0];
    else if (sh < VAR_MIN) return VAR_MIN[W-1:0];
    else                   return sh[W-1:0];
  endfunction

endpackage
