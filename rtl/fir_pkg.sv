// fir_pkg: constants shared by the systolic FIR filter and its processing
// element.
//
// The filter has four taps and carries 16-bit unsigned samples and 16-bit
// unsigned partial sums, as in the reference design's simulation, where the
// input b[15:0], the partial sums y1..y3 and the output q[15:0] are all 16 bits
// wide. The coefficient width is not fixed by the reference design; 16 bits is
// this design's choice. All arithmetic is unsigned and wraps modulo 2**ACC_W.
package fir_pkg;

  // Number of taps (processing elements) in the main configuration.
  parameter int unsigned TAPS   = 4;
  // Width of an input sample.
  parameter int unsigned DATA_W = 16;
  // Width of a filter coefficient (this design's choice).
  parameter int unsigned COEF_W = 16;
  // Width of a partial sum and of the filter output.
  parameter int unsigned ACC_W  = 16;

endpackage
