// Shared constants of the distributed-arithmetic (DA) LMS adaptive filter.
//
// N_TAPS is the filter length (four taps, the size the whole structure is
// drawn for). L_DEF is the default word length of the input samples, the
// desired signal and the weights; it follows the 8-bit sample buses of the
// reference simulation of the DA table. Every module takes L as a parameter
// whose default is L_DEF.
package da_pkg;
  localparam int unsigned N_TAPS = 4;
  localparam int unsigned L_DEF  = 8;
  // Number of DA-table entries: one per subset of the four samples.
  localparam int unsigned N_ENTRIES = 1 << N_TAPS;
endpackage
