// selfheal_pkg: types and constants shared by the self-healing systolic-array
// accelerator. Operands are signed 8-bit values and every partial sum, checksum
// and output-feature-map entry is a signed 32-bit accumulator. Both widths are
// this design's choice; the checksum test vector is a row of ones, so the
// checksum a column produces is the sum of the weights it holds.
package selfheal_pkg;
  parameter int unsigned DATA_W = 8;
  parameter int unsigned ACC_W  = 32;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Element value of the checksum test vector appended in testing mode.
  localparam data_t TEST_ELEM = data_t'(1);
endpackage
