// scm_pkg: shared sizes of the sub-threshold standard-cell memory (SCM).
//
// The memory holds 4 kbit. It is organised here as 128 words of 32 bits;
// the split into words and bits is this design's choice, only the 4 kbit
// total is fixed. Each module derives its address
// width from the number of words.
package scm_pkg;
  parameter int unsigned WORDS  = 128;
  parameter int unsigned WIDTH  = 32;
endpackage
