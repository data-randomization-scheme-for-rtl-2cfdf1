// data_scrambler -- combines user data with the random value.
//
// Each data byte is XORed bit by bit with the RV of its location. The XOR is
// its own inverse, so the same block randomizes data on its way into the
// flash and restores it on its way out, given the same RV. The operation is
// combinational: it adds no cycle to the data path. The published scheme speaks of
// transforming the user data with the RV; the XOR is this design's choice,
// and it reproduces the published uniformity figures for fixed patterns.
//
// Interface:
//   din   data byte in (user data on program, flash data on read)
//   rv    random value for this byte
//   dout  din ^ rv
module data_scrambler
  import flash_rand_pkg::*;
(
  input  rv_t din,
  input  rv_t rv,
  output rv_t dout
);

  assign dout = din ^ rv;

endmodule
