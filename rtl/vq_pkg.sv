// vq_pkg: word sizes shared by the systolic vector quantization processor.
//
// The Inner Product Processor (IPP) multiplies 12-bit two's complement input
// and codevector components and accumulates into a 25-bit running sum. The
// Comparator Processor (CP) compares 24-bit distortion values and reports a
// 16-bit codevector index, so a codebook holds at most 65,536 entries. The
// default vector dimension is 16, the largest cascade the word sizes are
// meant for. All of these numbers follow the document.
package vq_pkg;
  parameter int unsigned VQ_B  = 12;  // bits of a and b (input and codevector components)
  parameter int unsigned VQ_CW = 25;  // bits of the accumulated product c / d
  parameter int unsigned VQ_DW = 24;  // bits of a distortion value inside the CP
  parameter int unsigned VQ_IW = 16;  // bits of a codevector index
  parameter int unsigned VQ_K  = 16;  // vector dimension k = number of cascaded IPPs
endpackage
