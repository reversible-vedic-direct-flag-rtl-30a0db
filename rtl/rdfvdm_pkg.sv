// rdfvdm_pkg: types and constants shared by the Direct Flag Vedic divider,
// the GCD unit and the RSA key generator. Numbers cross module boundaries as
// packed arrays of BCD digits (index 0 is the least significant digit);
// remainders and internal values are plain binary.
package rdfvdm_pkg;
  typedef logic [3:0] digit_t;            // one BCD digit, 0..9
  localparam digit_t MAX_DIGIT = 4'd9;    // largest trial quotient digit
  localparam logic [7:0] TEN   = 8'd10;   // radix of the digit representation
endpackage
