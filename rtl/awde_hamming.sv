// awde_hamming: Hamming distance between two 48-bit Census vectors, i.e. the
// number of differing bits (0..48).  Purely combinational.
module awde_hamming
  import awde_pkg::*;
(
  input  census_t a,
  input  census_t b,
  output ham_t    hd
);
  always_comb hd = ham_t'($countones(a ^ b));
endmodule
