// abs_value: absolute-value circuit of the correlator.
//
// The accumulator counts chips where the sample matches the local Barker
// code, X = 0..11. Reading each chip as +1/-1 turns X into 2X-11, and the
// circuit outputs |2X-11| (11, 9, ..., 1, 1, ..., 11), so that a strongly
// correlated 0 bit and 1 bit compare equally against one threshold. The
// document gives this as a truth table with sum-of-products equations; here
// the same table is written arithmetically. Purely combinational. Inputs
// 12..15 cannot occur; they map to 2X-11 as well.
module abs_value
  import dsss_pkg::*;
(
  input  logic [3:0] x,
  output logic [3:0] y
);

  assign y = corr_mag(x);

endmodule
