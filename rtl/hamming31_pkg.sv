// hamming31_pkg: types and constants shared by the Hamming (3,1) encoder,
// error detector and error corrector.
//
// A Hamming (3,1) code carries D = 1 data bit with P = 2 parity bits, the
// smallest P that satisfies 2^P >= D + P + 1. The three bits of a code word
// are numbered by position 1..3: position 1 holds parity bit P1, position 2
// parity bit P2 and position 3 the data bit D1. The packed struct below keeps
// that order, so bit k-1 of a codeword_t is position k. P1 checks positions 1
// and 3, P2 checks positions 2 and 3; with a single data bit both parity bits
// are copies of D1 and the code is a triple repetition of the data bit.
// The syndrome {EDP2, EDP1} read at the receiver is the position of a single
// flipped bit, or 0 when the word is intact.
package hamming31_pkg;

  localparam int unsigned DATA_BITS   = 1;
  localparam int unsigned PARITY_BITS = 2;
  localparam int unsigned CODE_BITS   = DATA_BITS + PARITY_BITS;

  // A code word as a plain vector, bit k-1 = position k.
  typedef logic [CODE_BITS-1:0] code_vec_t;

  // Position 3 .. position 1.
  typedef struct packed {
    logic d1;  // position 3
    logic p2;  // position 2
    logic p1;  // position 1
  } codeword_t;

  // Syndrome: {EDP2, EDP1}, equal to the position of the erroneous bit.
  typedef logic [PARITY_BITS-1:0] syndrome_t;

  // One-hot decoder outputs O0..O3 (O0: no error, Ok: error at position k).
  typedef logic [2**PARITY_BITS-1:0] position_onehot_t;

endpackage
