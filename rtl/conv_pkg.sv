// conv_pkg: constants and helpers shared by the rate-1/2, constraint-length-3
// convolutional encoder and its parallel Viterbi decoder.
//
// Trellis state numbering used throughout the design: a state is the pair of
// the two most recent message bits, state = {older bit, newer bit}. Bit 0 of
// the state index is therefore the last bit that entered the encoder. From
// state s an input bit u leads to state {s[0], u}. The two predecessors of a
// state t are {0, t[1]} and {1, t[1]}; the first one ("j") has the dropped bit
// 0, the second one ("jn") has it 1.
//
// Code generators follow the encoder of the design: the first output bit of a
// symbol pair is u ^ s[0] ^ s[1] (octal 7), the second is u ^ s[1] (octal 5),
// which turns the message 10100 into 11 10 00 10 11.
package conv_pkg;

  localparam int unsigned K        = 3;             // constraint length
  localparam int unsigned N_STATES = 1 << (K - 1);  // trellis states
  localparam int unsigned PM_W     = 4;             // path metric width (bits)
  localparam int unsigned N_STAGES = 5;             // trellis stages decoded in parallel

  typedef logic [1:0] symbol_t;   // one received / transmitted symbol pair {first, second}
  typedef logic [K-2:0] state_t;  // trellis state {older bit, newer bit}

  // Branch word produced when input bit u is applied in state s.
  // Returned as {first output, second output}.
  function automatic symbol_t branch_word(state_t s, logic u);
    return {u ^ s[0] ^ s[1], u ^ s[1]};
  endfunction

endpackage
