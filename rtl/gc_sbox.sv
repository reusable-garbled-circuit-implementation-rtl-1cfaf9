// gc_sbox: garbled AES S-box for one byte, blue labels in and blue labels out.
//
// The eight input labels are matched against k2 to form the row index of a 256-row table;
// the row's S-box value is returned re-garbled with k1/k2. The table is the AES S-box, built
// in gc_pkg from its definition. Using the AES S-box on the garbled state, blue in and blue
// out, is the original design's; the lookup-and-re-garble structure is this design's, since the
// document does not say how the S-box handles garbled bytes. A label that is not k2 reads as 0.
// Only the blue keys k1/k2 are used; the red half of the key set is unconnected here.
// Combinational.
module gc_sbox
  import gc_pkg::*;
(
  input  gbyte_t x,
  input  gkey_t  keys,
  output gbyte_t y
);

  logic [7:0] idx, val;

  always_comb begin
    for (int i = 0; i < 8; i++) idx[i] = (x[i] == keys.k2);
    val = SBOX[idx];
    for (int i = 0; i < 8; i++) y[i] = val[i] ? keys.k2 : keys.k1;
  end

endmodule
