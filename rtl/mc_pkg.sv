// mc_pkg: types shared by the multi-coding write-data encoder and decoder.
//
// The coder picks, for every bus word, one of four reversible codings and sends
// the 2-bit code alongside the coded word. The code values are the lower two
// bits of the labels 000..011 that name the four coding blocks; carrying them
// in 2 bits (so a 32-bit word becomes a 34-bit bus) is this design's reading
// of "each pair has dual coding system control bits".
package mc_pkg;

  typedef enum logic [1:0] {
    CODE_INVERT     = 2'b00,  // invert every bit
    CODE_SWAP       = 2'b01,  // swap each pair of adjacent bits
    CODE_INV_EVEN   = 2'b10,  // invert bits 0, 2, 4, ...
    CODE_INV_ODD    = 2'b11   // invert bits 1, 3, 5, ...
  } mc_code_e;

  // 1-bit full adder: returns {carry, sum} of a + b + c. The Hamming-distance
  // counter is built from these cells.
  function automatic logic [1:0] full_add(input logic a, input logic b, input logic c);
    return {(a & b) | (a & c) | (b & c), a ^ b ^ c};
  endfunction

endpackage
