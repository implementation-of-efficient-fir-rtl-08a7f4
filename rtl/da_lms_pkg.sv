// Shared constants of the distributed-arithmetic (DA) delayed-LMS adaptive filter.
//
// The filter works on L-bit two's-complement samples and L-bit fractional
// two's-complement weights. A length-N filter is split into N/P inner-product
// blocks of P taps each; every block owns a DA table of 2**P-1 registers.
// The defaults are the main configuration: L = 8 (the control-word logic is
// drawn for an 8-bit word with a 7-bit magnitude), P = 4 and N = 16. The
// adaptation delay of 2 sample periods is fixed by the pipeline (one register
// after the inner product, one after the error).
package da_lms_pkg;
  parameter int unsigned DEF_L = 8;   // sample and weight word length
  parameter int unsigned DEF_P = 4;   // taps per inner-product block
  parameter int unsigned DEF_N = 16;  // filter length
endpackage
