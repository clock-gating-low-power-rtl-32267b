// vit_pkg: constants shared by the systolic Viterbi decoder.
//
// The decoder is built for a rate-1/2 convolutional code of constraint length K.
// A trellis state is the K-1 most recent input bits, newest in the MSB, so the
// state after input bit u from state s is {u, s[K-2:1]} and the predecessors of
// state n are {n[K-3:0], d} for d = 0, 1. The bit d is what a decision vector
// stores per state. The encoder register for that transition is {n, d} (K bits),
// and each output bit is the parity of that register masked by a generator.
//
// The defaults follow the worked example of the design: K = 3 (four states) and
// ten trace-back units. The generator pair (7,5 octal) and the path-metric width
// are choices of this implementation.
package vit_pkg;

  parameter int unsigned K_DEFAULT     = 3;      // constraint length of the example
  parameter int unsigned DEPTH_DEFAULT = 10;     // number of trace-back units
  parameter int unsigned G0_DEFAULT    = 'o7;    // generator of the first code bit
  parameter int unsigned G1_DEFAULT    = 'o5;    // generator of the second code bit
  parameter int unsigned PM_W_DEFAULT  = 8;      // path-metric width

  // Code bit produced by encoder register `r` under generator `g`.
  function automatic logic code_bit(input logic [31:0] r, input logic [31:0] g);
    return ^(r & g);
  endfunction

endpackage
